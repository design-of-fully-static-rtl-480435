// cvsl_dff -- fully-static differential flip-flop with active-low reset.
//
// Logic model of the 19-transistor CVSL cell that every stage of the scan
// chain is built from. The silicon cell is a split-output n-latch followed by
// a p-latch. An extra inverter and two n-transistors keep the p-latch outputs
// from floating, so the cell holds its state at any clock rate down to DC. In
// RTL that static behaviour is simply a register. The cell has one stored bit:
// Q is the bit and QB its complement.
//
// Interface: differential data in (d, db), differential data out (q, qb),
// clock and active-low reset. These are the six pins the layout brings out on
// both sides, so cells can abut in an array.
//
// Timing: d is sampled on the rising edge of clk (this design's choice; the
// edge polarity of the transistor cell is not stated). rst_n acts at once,
// without waiting for a clock, and forces q=0, qb=1 (asynchronous reset is also
// this design's choice). d and db must be complementary at the sampling edge,
// and an assertion checks it. Setup/hold and drive strength are analog
// properties and are not modelled.
module cvsl_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  input  logic db,
  output logic q,
  output logic qb
);

  logic state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= 1'b0;
    else        state <= d;
  end

  assign q  = state;
  assign qb = ~state;

  // The cell is differential: equal inputs are not a valid data value.
  a_complementary_inputs : assert property (@(posedge clk) d != db)
    else $error("cvsl_dff: d and db are not complementary");

endmodule
