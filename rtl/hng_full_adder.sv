// hng_full_adder: a one-bit full adder made of one reversible HNG gate.
//
// The HNG gate maps (A, B, C, D) to (A, B, A^B^C, (A^B)C ^ AB ^ D). With its
// fourth input D held at constant 0, the third output is the full adder's
// SUM = A ^ B ^ C and the fourth is its CARRY = (A ^ B)C ^ AB. The first two
// outputs only repeat A and B; they are the circuit's two garbage outputs,
// needed to keep the gate reversible, and are brought out so that nothing of
// the gate is hidden. One gate, quantum cost 6, two garbage outputs, delay 1.
//
// Parameter IMPL picks how the HNG gate is realized (see hng_pkg):
//   HNG_IMPL_LOGIC   (default) four XORs and two ANDs (hng_gate)
//   HNG_IMPL_QUANTUM the gate's six-gate quantum circuit (hng_qcascade)
// Both give the same outputs; the parameter and its default are this
// design's choice.
//
// Interface and timing: inputs a, b (addend bits) and c (carry-in), outputs
// sum, carry, garbage_a (= a) and garbage_b (= b). Purely combinational, no
// clock or reset.
module hng_full_adder
  import hng_pkg::*;
#(
  parameter hng_impl_e IMPL = HNG_IMPL_LOGIC
) (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry,
  output logic garbage_a,
  output logic garbage_b
);

  localparam logic ANCILLA_D = 1'b0;  // constant input D of the HNG gate

  if (IMPL == HNG_IMPL_QUANTUM) begin : g_quantum
    logic d_line_basis;
    hng_qcascade u_hng (
      .a(a), .b(b), .c(c), .d(ANCILLA_D),
      .p(garbage_a), .q(garbage_b), .r(sum), .s(carry),
      .d_line_basis(d_line_basis)
    );
    // The D line must leave the cascade in a basis state for every input.
    always_comb assert (d_line_basis)
      else $error("HNG cascade left the D line in a V superposition");
  end else begin : g_logic
    hng_gate u_hng (
      .a(a), .b(b), .c(c), .d(ANCILLA_D),
      .p(garbage_a), .q(garbage_b), .r(sum), .s(carry)
    );
  end

endmodule
