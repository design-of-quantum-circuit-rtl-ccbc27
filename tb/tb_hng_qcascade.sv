// tb_hng_qcascade: exhaustive self-checking test of the HNG gate's quantum
// circuit (hng_qcascade).
//
// Applies all 16 input vectors. The expected outputs are worked out from
// arithmetic rather than from the gate's XOR/AND form: r is the low bit and
// s ^ d the high bit of the count a + b + c. It also checks that the D line
// leaves the cascade in a basis state and that the 16 output vectors are all
// different, i.e. that the circuit is reversible.
// Combinational block: each vector is checked 1 time unit after it is applied.
module tb_hng_qcascade;

  logic a, b, c, d;
  logic p, q, r, s, d_line_basis;
  int   checks   = 0;
  int   failures = 0;
  bit   seen [16];

  hng_qcascade dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s),
                   .d_line_basis(d_line_basis));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b d=%0b got %0b expected %0b",
               what, a, b, c, d, got, exp);
    end
  endtask

  initial begin : watchdog
    #10_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [1:0] count;
    logic [3:0] outv;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      count = 2'(a) + 2'(b) + 2'(c);
      check("p", p, a);
      check("q", q, b);
      check("r", r, count[0]);
      check("s", s, count[1] ^ d);
      check("d_line_basis", d_line_basis, 1'b1);
      outv = {p, q, r, s};
      checks++;
      if (seen[outv]) begin
        failures++;
        $display("FAIL output vector %b produced twice", outv);
      end
      seen[outv] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
