// tb_pulse_shift_register -- self-checking test of the pulse select chain.
//
// Two instances run from one clock: the full 128-stage register and a short
// 5-stage one. The reference is a count of rising edges since reset. After
// edge e (1 <= e <= N) exactly stage e-1 is selected, and before edge 1 and
// after edge N no stage is. last is then high only after edge N, its
// complement opposite. The test makes several full sweeps. Some of them
// restart with a reset in the middle of a sweep, and others hold reset across
// clock edges.
module tb_pulse_shift_register;

  localparam int unsigned NL = 128;
  localparam int unsigned NS = 5;

  logic          clk = 1'b0;
  logic          rst_n = 1'b1;
  logic [NL-1:0] sel_l;
  logic [NS-1:0] sel_s;
  logic          last_l, last_b_l, last_s, last_b_s;
  int            checks = 0, failures = 0;
  int            edges = 0;           // rising edges since reset release
  int            ends_l = 0, ends_s = 0;

  pulse_shift_register dut_l (
    .clk(clk), .rst_n(rst_n), .sel(sel_l), .last(last_l), .last_b(last_b_l));
  pulse_shift_register #(.N(NS)) dut_s (
    .clk(clk), .rst_n(rst_n), .sel(sel_s), .last(last_s), .last_b(last_b_s));

  always #100 clk = ~clk;

  always @(posedge clk or negedge rst_n)
    if (!rst_n) edges <= 0;
    else        edges <= edges + 1;

  function automatic logic [NL-1:0] expect_sel(int e, int n);
    logic [NL-1:0] v = '0;
    if (e >= 1 && e <= n) v[e-1] = 1'b1;
    return v;
  endfunction

  // Compare in the middle of the low clock phase.
  always @(negedge clk) begin
    logic [NL-1:0] exp_l, exp_s;
    exp_l = expect_sel(edges, NL);
    exp_s = expect_sel(edges, NS);
    checks++;
    if (sel_l !== exp_l || last_l !== exp_l[NL-1] || last_b_l !== ~exp_l[NL-1]) begin
      failures++;
      $display("FAIL N=%0d edge %0d: sel=%h last=%b", NL, edges, sel_l, last_l);
    end
    checks++;
    if (sel_s !== exp_s[NS-1:0] || last_s !== exp_s[NS-1] || last_b_s !== ~exp_s[NS-1]) begin
      failures++;
      $display("FAIL N=%0d edge %0d: sel=%b last=%b", NS, edges, sel_s, last_s);
    end
    if (last_l) ends_l++;
    if (last_s) ends_s++;
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep(int cycles);
    @(negedge clk) rst_n = 1'b0;
    repeat (2) @(posedge clk);        // reset held across edges
    @(negedge clk) rst_n = 1'b1;
    repeat (cycles) @(posedge clk);
  endtask

  initial begin
    #1 rst_n = 1'b0;                  // power-on reset
    sweep(NL + 10);                   // full sweep and idle tail
    sweep(40);                        // aborted mid-sweep
    // Asynchronous reset in the middle of the high clock phase.
    @(posedge clk) #50 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    repeat (NL + 4) @(posedge clk);
    sweep(NL + 2);
    @(negedge clk);
    // Each full sweep shows last high for exactly one clock.
    checks++;
    if (ends_l != 3 || ends_s != 4) begin
      failures++;
      $display("FAIL end-of-chain count: N=%0d saw %0d, N=%0d saw %0d", NL, ends_l, NS, ends_s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
