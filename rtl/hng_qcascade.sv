// hng_qcascade: the HNG gate built from its quantum circuit, quantum cost 6.
//
// The circuit works on four qubit lines A, B, C, D and applies, in order:
//   1. V  on D, controlled by A
//   2. V  on D, controlled by B
//   3. V  on D, controlled by C
//   4. CNOT on C, controlled by A
//   5. CNOT on C, controlled by B      (C now holds A ^ B ^ C)
//   6. V+ on D, controlled by the new C
// After steps 1-3, D has been rotated by V once for each 1 among A, B, C
// (n rotations). Step 6 takes one rotation back when A ^ B ^ C is 1, that is
// when n is odd. The net rotation is V^(n - (n mod 2)): nothing for n = 0 or
// 1, V*V = NOT for n = 2 or 3. So D ends as D ^ maj(A,B,C) = D ^ (A^B)C ^ AB,
// the HNG's fourth output, and the line is back in a basis state.
//
// Lines are modelled in the four-valued logic of hng_pkg (0, 1, V0, V1). The
// gate order and the gates are the design's; the V/V+ algebra is standard
// background. Because all controls are basis values the model is exact.
//
// Interface and timing: single-bit inputs a, b, c, d and outputs p, q, r, s,
// as in hng_gate. d_line_basis is 1 when the D line ends in 0 or 1 rather
// than in V0 or V1; for a correct cascade it is always 1. Purely
// combinational.
module hng_qcascade
  import hng_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic d_line_basis
);

  qval_e c_line [0:2];  // C line: at input, after step 4, after step 5
  qval_e d_line [0:4];  // D line: at input, after steps 1, 2, 3, 6

  always_comb begin
    c_line[0] = q_from_bit(c);
    d_line[0] = q_from_bit(d);
    d_line[1] = q_cv(a, d_line[0]);                  // step 1
    d_line[2] = q_cv(b, d_line[1]);                  // step 2
    d_line[3] = q_cv(q_to_bit(c_line[0]), d_line[2]); // step 3
    c_line[1] = q_cnot(a, c_line[0]);                // step 4
    c_line[2] = q_cnot(b, c_line[1]);                // step 5
    d_line[4] = q_cvdag(q_to_bit(c_line[2]), d_line[3]); // step 6
    p            = a;
    q            = b;
    r            = q_to_bit(c_line[2]);
    s            = q_to_bit(d_line[4]);
    d_line_basis = q_is_basis(d_line[4]);
  end

endmodule
