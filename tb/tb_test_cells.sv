// tb_test_cells -- self-checking test of the stand-alone test structures.
//
// Drives the two test flip-flops with independent random complementary data
// and clocks of different periods (100 and 140 units, half-periods 50/70).
// It checks the three buffered outputs of the first (Q, QB, Q) and the direct
// Q/QB of the second against a sampled copy of their inputs, checks the resets
// separately, and checks the inverter on every random input value.
module tb_test_cells;

  logic       c1 = 1'b0, c2 = 1'b0;
  logic       r1 = 1'b1, r2 = 1'b1;
  logic       d1 = 1'b0, d2 = 1'b0;
  logic [2:0] out1;
  logic       q2, qb2;
  logic       a = 1'b0, y;
  logic       m1 = 1'b0, m2 = 1'b0;   // reference: last sampled bits
  int         checks = 0, failures = 0;

  test_cells dut (
    .tff1_clk(c1), .tff1_rst_n(r1), .tff1_d(d1), .tff1_db(~d1), .tff1_out(out1),
    .tff2_clk(c2), .tff2_rst_n(r2), .tff2_d(d2), .tff2_db(~d2),
    .tff2_q(q2), .tff2_qb(qb2),
    .tinv_a(a), .tinv_y(y));

  always #50 c1 = ~c1;
  always #70 c2 = ~c2;

  always @(posedge c1 or negedge r1) if (!r1) m1 <= 1'b0; else m1 <= d1;
  always @(posedge c2 or negedge r2) if (!r2) m2 <= 1'b0; else m2 <= d2;

  // New data shortly after each falling edge, away from the sampling edges.
  always @(negedge c1) d1 <= 1'($urandom);
  always @(negedge c2) d2 <= 1'($urandom);

  task automatic compare(input string what);
    checks++;
    if (out1 !== {m1, ~m1, m1} || q2 !== m2 || qb2 !== ~m2) begin
      failures++;
      $display("FAIL %s: out1=%b (m1=%b) q2=%b qb2=%b (m2=%b)", what, out1, m1, q2, qb2, m2);
    end
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 r1 = 1'b0; r2 = 1'b0;         // power-on reset
    #4 compare("in reset");
    #300 r1 = 1'b1;
    #200 r2 = 1'b1;
    for (int i = 0; i < 500; i++) begin
      #13;
      a = 1'($urandom);
      #1;
      compare("running");
      checks++;
      if (y !== ~a) begin
        failures++;
        $display("FAIL inverter: a=%b y=%b", a, y);
      end
      if (i == 250) begin
        r1 = 1'b0;
        #1 compare("flip-flop 1 async reset");
        #40 r1 = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
