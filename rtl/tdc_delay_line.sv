// Time-to-digital delay line of one comparator: y_i*(t).
//
// A comparator output b_i enters a chain of CELLS delay cells; an adder counts
// how many cells currently hold the high level. After b_i rises, y rises by
// one every cell time T (a stair with step T) and saturates at CELLS; after
// b_i falls, the low level propagates in and y falls again. Reading y when a
// comparator changes state therefore converts the time it was set into a
// number of cells. Each cell is a flip-flop that advances on `tick`, one
// pulse per cell time (40 ns in the prototype's lines); the cells of the
// prototype are asynchronous delay elements. y is registered: it is valid
// one clock after the tick that moved the chain.
module tdc_delay_line #(
  parameter int unsigned CELLS = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     tick,  // one pulse per cell time T
  input  logic                     b,     // comparator output (synchronised)
  output logic [$clog2(CELLS+1)-1:0] y    // cells the high level has passed
);

  logic [CELLS-1:0] cells;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cells <= '0;
    else if (tick) cells <= {cells[CELLS-2:0], b};
  end

  // Asynchronous adder of the document: a population count of the cells.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= $bits(y)'($countones(cells));
  end

endmodule
