// tb_hng_full_adder_quantum: end-to-end test of the HNG full adder with the
// HNG gate realized as its quantum circuit (IMPL = HNG_IMPL_QUANTUM). The
// checks are those of tb_hng_full_adder.
//
// Applies all eight (a, b, c) combinations, several rounds in a random order,
// and compares sum and carry with the two bits of the integer a + b + c, and
// the garbage outputs with a and b. It also counts how often each way of
// forming the carry occurred: generated by a & b, propagated by (a ^ b) & c,
// or killed (no carry). Each must occur at least once. Combinational
// design: each vector is checked 1 time unit after it is applied.
module tb_hng_full_adder_quantum;

  localparam int ROUNDS = 4;

  logic a, b, c;
  logic sum, carry, garbage_a, garbage_b;
  int   checks   = 0;
  int   failures = 0;
  int   n_generate  = 0;
  int   n_propagate = 0;
  int   n_kill      = 0;

  hng_full_adder #(.IMPL(hng_pkg::HNG_IMPL_QUANTUM)) dut (
    .a(a), .b(b), .c(c),
    .sum(sum), .carry(carry), .garbage_a(garbage_a), .garbage_b(garbage_b)
  );

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b got %0b expected %0b",
               what, a, b, c, got, exp);
    end
  endtask

  task automatic apply(input logic [2:0] v);
    logic [1:0] total;
    {a, b, c} = v;
    #1;
    total = 2'(a) + 2'(b) + 2'(c);
    check("sum", sum, total[0]);
    check("carry", carry, total[1]);
    check("garbage_a", garbage_a, a);
    check("garbage_b", garbage_b, b);
    if (a && b)             n_generate++;
    else if ((a != b) && c) n_propagate++;
    else                    n_kill++;
  endtask

  initial begin : watchdog
    #10_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [2:0] order [8];
    for (int r = 0; r < ROUNDS; r++) begin
      // random permutation of the eight vectors
      for (int i = 0; i < 8; i++) order[i] = 3'(i);
      for (int i = 7; i > 0; i--) begin
        logic [2:0] j;
        logic [2:0] t;
        j = 3'($urandom_range(i, 0));
        t = order[i]; order[i] = order[j]; order[j] = t;
      end
      for (int i = 0; i < 8; i++) apply(order[i]);
    end
    checks += 3;
    if (n_generate == 0)  begin failures++; $display("FAIL carry generate never seen"); end
    if (n_propagate == 0) begin failures++; $display("FAIL carry propagate never seen"); end
    if (n_kill == 0)      begin failures++; $display("FAIL carry kill never seen"); end
    $display("carry generated %0d, propagated %0d, killed %0d times",
             n_generate, n_propagate, n_kill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
