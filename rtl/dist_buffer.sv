// On-chip "dist" buffer of the KNN accelerator: the global-memory buffer used
// only between the two kernels, kept in on-chip block RAM instead of external
// DRAM.
//
// Simple dual-port RAM of DEPTH words: one write port and one read port with
// a registered output (rdata holds the word addressed in the previous cycle
// with re high). Keeping this buffer on chip follows the document; the port
// structure is this design's choice.
module dist_buffer #(
  parameter int unsigned DEPTH = 300000,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
