// tb_cvsl_dff -- self-checking test of the differential flip-flop cell.
//
// Drives random complementary data on the falling clock edge and checks, after
// each rising edge, that q equals the bit sampled and qb its complement. Also
// checks: reset value while rst_n is low; that reset acts between clock
// edges (asynchronously); that the stored bit survives a long clock stop
// (static operation); and that a rising edge during reset changes nothing.
// Clock: 200-unit period, the 5 MHz nominal rate with 1 unit = 1 ns.
module tb_cvsl_dff;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic d = 1'b0, db = 1'b1;
  logic q, qb;
  int   checks = 0, failures = 0;

  cvsl_dff dut (.clk(clk), .rst_n(rst_n), .d(d), .db(db), .q(q), .qb(qb));

  always #100 clk = ~clk;

  task automatic check(input logic exp_q, input string what);
    checks++;
    if (q !== exp_q || qb !== ~exp_q) begin
      failures++;
      $display("FAIL %s: q=%0b qb=%0b expected q=%0b", what, q, qb, exp_q);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic bit_in;
    // Reset held across clock edges, even with d = 1.
    d = 1'b1; db = 1'b0;
    #1 rst_n = 1'b0;                  // power-on reset
    repeat (3) @(posedge clk);
    #1 check(1'b0, "during reset");
    @(negedge clk) rst_n = 1'b1;
    @(posedge clk) #1 check(1'b1, "first edge after reset");

    // Random data.
    for (int i = 0; i < 300; i++) begin
      logic prev;
      @(negedge clk);
      prev   = q;
      bit_in = 1'($urandom);
      d = bit_in; db = ~bit_in;
      #50 check(prev, "hold between edges");
      @(posedge clk) #1 check(bit_in, "sample");
    end

    // Asynchronous reset between edges.
    @(negedge clk) d = 1'b1; db = 1'b0;
    @(posedge clk) #1 check(1'b1, "set before async reset");
    #30 rst_n = 1'b0;
    #1 check(1'b0, "async reset");
    #20 rst_n = 1'b1;
    #1 check(1'b0, "after async reset, before edge");
    @(posedge clk) #1 check(1'b1, "capture after async reset");

    // Static hold: data changes while the clock is stopped must not leak through.
    @(negedge clk);
    force clk = 1'b0;
    d = 1'b0; db = 1'b1;
    #1000000 check(1'b1, "static hold, clock stopped");
    release clk;
    @(posedge clk) #1 check(1'b0, "capture after clock stop");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
