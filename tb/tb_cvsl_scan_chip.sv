// tb_cvsl_scan_chip -- end-to-end test of the scan chip at full size.
//
// Runs the chip with its default sizes (128 columns x 128 rows) through a
// whole frame and beyond, the way a sensor controller would: release both
// resets, clock until col_end appears, clock once more so the row clock fires,
// pulse col_rst_n to start the next column sweep, and repeat. After 128
// sweeps row_end is high. One more sweep moves the row pulse out of the
// register, and a row reset then starts a new frame.
//
// The reference model is two counters. One counts pixel-clock edges since the
// column reset; the other counts row steps, which happen on the edge after the
// one that put the pulse in the last column. Every clock the test compares
// col_sel, row_sel, col_end and row_end with the one-hot values the counters
// give. It also checks the latencies: col_end rises exactly N_COL edges after
// the column reset. The test cells are exercised through the chip's pins.
// Each mechanism is counted, and one that never happens counts as a failure:
// full column sweep, row clock, row step, row end, column restart, aborted
// sweep, frame restart.
module tb_cvsl_scan_chip;

  localparam int unsigned NC = 128;
  localparam int unsigned NR = 128;

  logic          clk = 1'b0;
  logic          col_rst_n = 1'b1, row_rst_n = 1'b1;
  logic [NC-1:0] col_sel;
  logic [NR-1:0] row_sel;
  logic          col_end, row_end;
  logic          t1c = 1'b0, t1r = 1'b0, t1d = 1'b0, t2c = 1'b0, t2r = 1'b0, t2d = 1'b0;
  logic          ta = 1'b0;
  logic [2:0]    t1out;
  logic          t2q, t2qb, ty;

  int checks = 0, failures = 0;
  int col_edges = 0;      // pixel-clock edges since column reset release
  int row_steps = 0;      // row-clock edges since row reset release
  int n_sweeps = 0, n_rowclk = 0, n_rowend = 0, n_col_restart = 0;
  int n_abort = 0, n_frame_restart = 0, n_test = 0;

  cvsl_scan_chip dut (
    .clk(clk), .col_rst_n(col_rst_n), .row_rst_n(row_rst_n),
    .col_sel(col_sel), .row_sel(row_sel), .col_end(col_end), .row_end(row_end),
    .tff1_clk(t1c), .tff1_rst_n(t1r), .tff1_d(t1d), .tff1_db(~t1d), .tff1_out(t1out),
    .tff2_clk(t2c), .tff2_rst_n(t2r), .tff2_d(t2d), .tff2_db(~t2d),
    .tff2_q(t2q), .tff2_qb(t2qb),
    .tinv_a(ta), .tinv_y(ty));

  always #100 clk = ~clk;   // 200-unit period: 5 MHz with 1 unit = 1 ns

  // Reference model.
  always @(posedge clk or negedge col_rst_n)
    if (!col_rst_n) col_edges <= 0;
    else            col_edges <= col_edges + 1;

  // The row register steps on the edge that follows the column pulse's
  // arrival in the last stage (edge NC+1), unless the column is held in reset.
  always @(posedge clk or negedge row_rst_n)
    if (!row_rst_n)                              row_steps <= 0;
    else if (col_rst_n && col_edges == NC)       row_steps <= row_steps + 1;

  function automatic logic [NC-1:0] onehot_c(int e);
    logic [NC-1:0] v = '0;
    if (e >= 1 && e <= NC) v[e-1] = 1'b1;
    return v;
  endfunction

  function automatic logic [NR-1:0] onehot_r(int e);
    logic [NR-1:0] v = '0;
    if (e >= 1 && e <= NR) v[e-1] = 1'b1;
    return v;
  endfunction

  logic [NR-1:0] row_prev = '0;
  always @(negedge clk) begin
    logic [NC-1:0] ec;
    logic [NR-1:0] er;
    ec = onehot_c(col_edges);
    er = onehot_r(row_steps);
    checks++;
    if (col_sel !== ec || col_end !== ec[NC-1]) begin
      failures++;
      $display("FAIL column at edge %0d: col_sel=%h col_end=%b", col_edges, col_sel, col_end);
    end
    checks++;
    if (row_sel !== er || row_end !== er[NR-1]) begin
      failures++;
      $display("FAIL row at step %0d: row_sel=%h row_end=%b", row_steps, row_sel, row_end);
    end
    if (col_end) n_sweeps++;
    if (row_end) n_rowend++;
    if (row_rst_n && row_sel != row_prev && row_sel != '0) n_rowclk++;
    row_prev = row_sel;
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One column sweep: release the column reset, wait for col_end, checking
  // its latency, then one more edge for the row clock, then reset the column.
  task automatic line();
    int waited = 0;
    @(negedge clk) col_rst_n = 1'b1;
    n_col_restart++;
    do begin
      @(negedge clk);
      waited++;
    end while (!col_end && waited < NC + 5);
    checks++;
    if (waited != NC) begin
      failures++;
      $display("FAIL col_end after %0d edges, expected %0d", waited, NC);
    end
    @(negedge clk);
    @(negedge clk) col_rst_n = 1'b0;
  endtask

  task automatic exercise_test_cells();
    logic b;
    for (int i = 0; i < 8; i++) begin
      b = 1'($urandom);
      t1r = 1'b1; t2r = 1'b1;
      t1d = b; t2d = ~b; ta = b;
      #5 t1c = 1'b1; t2c = 1'b1;
      #5 t1c = 1'b0; t2c = 1'b0;
      checks++;
      if (t1out !== {b, ~b, b} || t2q !== ~b || t2qb !== b || ty !== ~b) begin
        failures++;
        $display("FAIL test cells: b=%b t1out=%b t2q=%b t2qb=%b ty=%b", b, t1out, t2q, t2qb, ty);
      end
      n_test++;
    end
  endtask

  initial begin
    #1 col_rst_n = 1'b0; row_rst_n = 1'b0;  // power-on reset
    repeat (3) @(posedge clk);
    @(negedge clk) row_rst_n = 1'b1;

    // An aborted sweep: column reset before the pulse reaches the end.
    @(negedge clk) col_rst_n = 1'b1;
    repeat (50) @(negedge clk);
    col_rst_n = 1'b0;
    n_abort++;
    checks++;
    if (row_sel !== '0) begin
      failures++;
      $display("FAIL aborted sweep moved the row register");
    end

    // A whole frame: NR sweeps, then one more which empties the row register.
    for (int r = 0; r < NR + 1; r++) line();

    // New frame.
    @(negedge clk) row_rst_n = 1'b0;
    @(negedge clk) row_rst_n = 1'b1;
    n_frame_restart++;
    line();
    checks++;
    if (row_sel !== NR'(1)) begin
      failures++;
      $display("FAIL first row after frame restart: %h", row_sel);
    end

    exercise_test_cells();

    // Every mechanism must have occurred.
    checks++;
    // row_end stays high for one whole line: NC + 3 clocks with this line() task.
    if (n_sweeps != NR + 2 || n_rowend != NC + 3 || n_rowclk != NR + 1 ||
        n_col_restart != NR + 2 || n_abort == 0 || n_frame_restart == 0 || n_test == 0) begin
      failures++;
      $display("FAIL mechanism counts: sweeps=%0d row_end_clocks=%0d row_steps=%0d col_restarts=%0d aborts=%0d frame_restarts=%0d test_cells=%0d",
               n_sweeps, n_rowend, n_rowclk, n_col_restart, n_abort, n_frame_restart, n_test);
    end
    $display("mechanisms: sweeps=%0d row_end_clocks=%0d row_steps=%0d col_restarts=%0d aborts=%0d frame_restarts=%0d test_cells=%0d",
             n_sweeps, n_rowend, n_rowclk, n_col_restart, n_abort, n_frame_restart, n_test);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
