// hng_pkg: types and functions shared by the HNG full adder.
//
// The HNG gate has two realizations here. HNG_IMPL_LOGIC is a plain gate
// network of four XORs and two ANDs, the gate count given as the HNG's
// hardware complexity. HNG_IMPL_QUANTUM follows the gate's quantum circuit:
// controlled-V, controlled-V+ and CNOT gates acting on single qubit lines.
//
// A line of that circuit is tracked in the usual four-valued model of
// binary-controlled V gates: besides the basis values 0 and 1 a line can hold
// V0 = V|0> or V1 = V|1>, where V is the square root of NOT (V*V = NOT,
// V+ = V^-1). As long as every control is a basis value, applying V or V+
// moves a line around the cycle 0 -> V0 -> 1 -> V1 -> 0 (V forward, V+
// backward), so two bits per line are enough. The V/V+ semantics is standard
// reversible-logic background; the order of gates is the design's.
package hng_pkg;

  // Realization of the HNG gate selected by hng_full_adder.
  typedef enum logic {
    HNG_IMPL_LOGIC   = 1'b0,
    HNG_IMPL_QUANTUM = 1'b1
  } hng_impl_e;

  // Value of one qubit line. The encoding puts the four values in cycle
  // order, so V is +1 and V+ is -1 modulo 4.
  typedef enum logic [1:0] {
    Q_0  = 2'd0,
    Q_V0 = 2'd1,
    Q_1  = 2'd2,
    Q_V1 = 2'd3
  } qval_e;

  // Basis value for a classical bit.
  function automatic qval_e q_from_bit(input logic x);
    return x ? Q_1 : Q_0;
  endfunction

  // True if the line holds 0 or 1 (is not in a V superposition).
  function automatic logic q_is_basis(input qval_e q);
    return (q == Q_0) || (q == Q_1);
  endfunction

  // Classical bit of a basis value (1 for Q_1, 0 otherwise).
  function automatic logic q_to_bit(input qval_e q);
    return q == Q_1;
  endfunction

  // Controlled-V: V applied to the target when the control is 1.
  function automatic qval_e q_cv(input logic ctrl, input qval_e tgt);
    return ctrl ? qval_e'(tgt + 2'd1) : tgt;
  endfunction

  // Controlled-V+: the inverse of V applied when the control is 1.
  function automatic qval_e q_cvdag(input logic ctrl, input qval_e tgt);
    return ctrl ? qval_e'(tgt - 2'd1) : tgt;
  endfunction

  // CNOT (Feynman gate) on a basis-valued target.
  function automatic qval_e q_cnot(input logic ctrl, input qval_e tgt);
    return ctrl ? qval_e'(tgt + 2'd2) : tgt;
  endfunction

endpackage
