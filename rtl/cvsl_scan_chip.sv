// cvsl_scan_chip -- column/row select generator for a 128x128 pixel sensor.
//
// The chip scans an N_COL x N_ROW pixel array one pixel at a time. It uses
// no counter or decoder: a single logic-1 pulse walks down a chain of static
// differential flip-flops.
//   * Column register: a pulse_shift_register on the pixel clock. After
//     col_rst_n is released, col_sel[k] is high during clock k+1 (counting the
//     first rising edge as 1). The pulse leaves the last column after edge
//     N_COL + 1.
//   * Row-clock flip-flop: samples the last column bit on the pixel clock. Its
//     Q is the row clock: one pixel-clock period high, starting one edge after
//     the column pulse reached the end.
//   * Row register: a pulse_shift_register of the same kind, clocked by the
//     row clock. It moves one row per completed column sweep.
//   * col_end and row_end (the last bit of each register) go to pads. They
//     tell the controller that a sweep has finished and that the register is
//     ready to be reset again.
//   * test_cells: stand-alone flip-flops and an inverter for characterisation.
//
// Operating sequence: hold both resets low, release them, and clock N_COL
// times. The columns sweep, and col_end rises after edge N_COL. On the next
// edge the row clock rises, and the row register takes its next step (the
// first step after a row reset selects row 0). Pulse col_rst_n low to start
// the next sweep, then repeat. After N_ROW sweeps row_end is high, and the
// frame is restarted with row_rst_n.
//
// Timing: everything in the column part samples on the rising edge of clk.
// The row register samples on the rising edge of the row clock, a clock made
// inside the chip, as in the source design. Both resets are asynchronous and
// active low. Sizes (128 x 128), the pulse scheme, the row-clock flip-flop
// and the end-of-chain pads follow the source design. The two separate resets
// and the 128-stage row register are this design's reading of it.
module cvsl_scan_chip #(
  parameter int unsigned N_COL = 128,
  parameter int unsigned N_ROW = 128
) (
  input  logic             clk,
  input  logic             col_rst_n,
  input  logic             row_rst_n,
  output logic [N_COL-1:0] col_sel,
  output logic [N_ROW-1:0] row_sel,
  output logic             col_end,
  output logic             row_end,
  // stand-alone test cells
  input  logic             tff1_clk,
  input  logic             tff1_rst_n,
  input  logic             tff1_d,
  input  logic             tff1_db,
  output logic [2:0]       tff1_out,
  input  logic             tff2_clk,
  input  logic             tff2_rst_n,
  input  logic             tff2_d,
  input  logic             tff2_db,
  output logic             tff2_q,
  output logic             tff2_qb,
  input  logic             tinv_a,
  output logic             tinv_y
);

  logic col_end_b;
  logic row_clk;

  pulse_shift_register #(.N(N_COL)) u_col (
    .clk   (clk),
    .rst_n (col_rst_n),
    .sel   (col_sel),
    .last  (col_end),
    .last_b(col_end_b)
  );

  // Row-clock generation: carries the end of the column sweep to the row
  // register as a one-period clock pulse.
  cvsl_dff u_row_clk (
    .clk  (clk),
    .rst_n(col_rst_n),
    .d    (col_end),
    .db   (col_end_b),
    .q    (row_clk),
    .qb   ()
  );

  pulse_shift_register #(.N(N_ROW)) u_row (
    .clk   (row_clk),
    .rst_n (row_rst_n),
    .sel   (row_sel),
    .last  (row_end),
    .last_b()
  );

  test_cells u_test (
    .tff1_clk  (tff1_clk),
    .tff1_rst_n(tff1_rst_n),
    .tff1_d    (tff1_d),
    .tff1_db   (tff1_db),
    .tff1_out  (tff1_out),
    .tff2_clk  (tff2_clk),
    .tff2_rst_n(tff2_rst_n),
    .tff2_d    (tff2_d),
    .tff2_db   (tff2_db),
    .tff2_q    (tff2_q),
    .tff2_qb   (tff2_qb),
    .tinv_a    (tinv_a),
    .tinv_y    (tinv_y)
  );

endmodule
