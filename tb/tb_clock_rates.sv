// tb_clock_rates -- the scan chip at the three clock rates it is specified for.
//
// The chip is meant for a slow row clock and must therefore be fully static.
// This test runs one complete column sweep plus the row step that follows it
// at 5 MHz (the maximum rate), at 1 MHz and at 1 Hz (static operation), with
// 1 time unit = 1 ns. At each rate it checks, on every clock, that exactly
// column k-1 is selected after edge k. It also checks that col_end appears
// after exactly 128 edges, and that the row register selects row 0 one edge
// later. The logic model has no timing limits, so all three rates must give
// the same cycle-level behaviour.
module tb_clock_rates;

  localparam int unsigned NC = 128;
  localparam int unsigned NR = 128;

  logic          clk = 1'b0;
  logic          col_rst_n = 1'b1, row_rst_n = 1'b1;
  logic [NC-1:0] col_sel;
  logic [NR-1:0] row_sel;
  logic          col_end, row_end;
  logic [2:0]    t1out;
  logic          t2q, t2qb, ty;
  longint        half_period;
  int            checks = 0, failures = 0;

  cvsl_scan_chip dut (
    .clk(clk), .col_rst_n(col_rst_n), .row_rst_n(row_rst_n),
    .col_sel(col_sel), .row_sel(row_sel), .col_end(col_end), .row_end(row_end),
    .tff1_clk(1'b0), .tff1_rst_n(1'b0), .tff1_d(1'b0), .tff1_db(1'b1), .tff1_out(t1out),
    .tff2_clk(1'b0), .tff2_rst_n(1'b0), .tff2_d(1'b0), .tff2_db(1'b1),
    .tff2_q(t2q), .tff2_qb(t2qb),
    .tinv_a(1'b0), .tinv_y(ty));

  task automatic cycle();
    #(half_period) clk = 1'b1;
    #(half_period) clk = 1'b0;
  endtask

  task automatic run_at(input longint period_ns, input string name);
    logic [NC-1:0] exp_c;
    half_period = period_ns / 2;
    col_rst_n = 1'b0; row_rst_n = 1'b0;
    cycle();
    col_rst_n = 1'b1; row_rst_n = 1'b1;
    for (int e = 1; e <= NC + 1; e++) begin
      cycle();
      exp_c = '0;
      if (e <= NC) exp_c[e-1] = 1'b1;
      checks++;
      if (col_sel !== exp_c || col_end !== (e == NC)) begin
        failures++;
        $display("FAIL %s edge %0d: col_sel=%h col_end=%b", name, e, col_sel, col_end);
      end
      checks++;
      if (row_sel !== ((e == NC + 1) ? NR'(1) : '0)) begin
        failures++;
        $display("FAIL %s edge %0d: row_sel=%h", name, e, row_sel);
      end
    end
    $display("%s: %0d-column sweep and first row step in %0d clocks of %0d ns",
             name, NC, NC + 2, period_ns);
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 col_rst_n = 1'b0; row_rst_n = 1'b0;   // power-on reset
    run_at(64'd200, "5 MHz");
    run_at(64'd1_000, "1 MHz");
    run_at(64'd1_000_000_000, "1 Hz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
