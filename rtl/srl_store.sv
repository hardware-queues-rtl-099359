// srl_store: WIDTH x DEPTH addressable shift register, the storage of the
// shift-register queues.
//
// A word written with en high enters position 0 and all stored words move
// up one position; q reads the word at position addr combinationally.  The
// array is built the way 16-deep shift cells are combined: WIDTH cells side
// by side give the width, ceil(DEPTH/16) cells in cascade (each cell's last
// bit feeding the next cell's input) give the depth.  Positions past DEPTH
// in the last cascade stage exist but are never addressed by the queues.
// Contents are not reset.
module srl_store #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  input  logic [AW-1:0]    addr,
  output logic [WIDTH-1:0] q
);

  localparam int unsigned NCELL = (DEPTH + 15) / 16;  // cells in cascade
  localparam int unsigned CW    = (NCELL > 1) ? $clog2(NCELL) : 1;

  // cell outputs: [stage][bit]
  logic [WIDTH-1:0] cq   [NCELL];
  logic [WIDTH-1:0] cq15 [NCELL];
  logic [3:0]       cell_a;
  logic [CW-1:0]    cell_sel;

  // Split the position into cell-in-cascade and position-in-cell.
  always_comb begin
    logic [AW+4-1:0] wide;
    wide     = (AW + 4)'(addr);
    cell_a   = wide[3:0];
    cell_sel = CW'(wide >> 4);
  end

  for (genvar s = 0; s < NCELL; s++) begin : g_stage
    for (genvar b = 0; b < WIDTH; b++) begin : g_bit
      logic din;
      if (s == 0) begin : g_first
        assign din = d[b];
      end else begin : g_next
        assign din = cq15[s-1][b];
      end
      srl16 u_cell (
        .clk (clk),
        .ce  (en),
        .d   (din),
        .a   (cell_a),
        .q   (cq[s][b]),
        .q15 (cq15[s][b])
      );
    end
  end

  assign q = (NCELL == 1) ? cq[0] : cq[cell_sel];

endmodule
