// hng_gate: the 4x4 reversible HNG gate as a combinational gate network.
//
// Function (from the gate's definition):
//   p = a
//   q = b
//   r = a ^ b ^ c
//   s = ((a ^ b) & c) ^ (a & b) ^ d
// Every one of the 16 input vectors maps to a different output vector, so
// the gate is reversible: no input information is lost. Outputs p and q are
// wires from a and b by the gate's definition; they carry the information
// that keeps the mapping reversible.
//
// How it works: a ^ b is formed once and shared by r and s, which leaves
// four XORs and two ANDs, the gate count the design gives as the HNG's
// hardware complexity (4 alpha + 2 beta). The sharing of a ^ b is this
// implementation's reading of that count.
//
// Interface and timing: single-bit inputs a, b, c, d and outputs p, q, r, s;
// purely combinational, no clock, outputs follow the inputs after one gate
// level of the reversible circuit (unit delay 1).
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  logic a_x_b;   // a ^ b, shared by r and s
  logic prop_c;  // (a ^ b) & c
  logic gen_ab;  // a & b

  always_comb begin
    a_x_b  = a ^ b;
    prop_c = a_x_b & c;
    gen_ab = a & b;
    p      = a;
    q      = b;
    r      = a_x_b ^ c;
    s      = prop_c ^ gen_ab ^ d;
  end

endmodule
