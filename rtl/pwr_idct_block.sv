// Power-conscious IDCT block: an 8x8 IDCT in a power-switchable domain with
// its power management around it.
//
// Always-on domain:
//   * pmb        turns pso_req into iso_enable, ret_enable, pso_enable and cg
//                in the safe order (isolate, retain, switch off; and back);
//   * clock_gate stops the IDCT clock while cg is high, so clock gating and
//                power gating are driven by the same request;
//   * sync_fifo  holds coefficients that arrive while the IDCT is asleep or
//                still waking up.
// Switchable domain:
//   * idct_2d    the transform, clocked by the gated clock; while pso_enable
//                is high it is held in reset, which models the loss of its
//                state without power;
//   * retention_reg  a count of finished blocks, kept across shut-off.
// The IDCT outputs (out_valid, out_data, idle) pass through isolation cells
// that clamp them to 0 while iso_enable is high. The FIFO is drained only
// while the domain is fully on (pso, ret and iso all low).
//
// pso_req is the "enable" of the power management block: it is found by
// profiling and comes from outside. It should be raised only when idle is
// high and the FIFO is empty, or a block in progress is lost. The power
// control outputs are brought out for the power switch and for observation.
// The structure follows the document; the reset model of power loss, the
// FIFO read rule, the clamp value and the retained counter are this design's
// choices.
// Lint may report rst_n as used both as an asynchronous reset and as a
// synchronous signal: the second use is the disable condition of the
// assertions at the end; the logic itself resets asynchronously only.
module pwr_idct_block #(
  parameter int unsigned CW         = 12,
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pso_req,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [CW-1:0] in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [7:0]           out_data,
  output logic                 idle,
  output logic                 fifo_empty,
  output logic                 iso_enable,
  output logic                 ret_enable,
  output logic                 pso_enable,
  output logic                 cg,
  output logic [15:0]          blocks_done
);

  logic          gclk;
  logic          dom_rst_n;
  logic          domain_on;
  logic          fifo_valid;
  logic [CW-1:0] fifo_data;
  logic          idct_in_ready;
  logic          idct_out_valid;
  logic [7:0]    idct_out_data;
  logic          idct_idle;
  logic          idct_block_done;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  pmb u_pmb (
    .clk        (clk),
    .rst_n      (rst_n),
    .enable     (pso_req),
    .iso_enable (iso_enable),
    .ret_enable (ret_enable),
    .pso_enable (pso_enable),
    .cg         (cg)
  );

  clock_gate u_cg (
    .clk  (clk),
    .en   (!cg),
    .gclk (gclk)
  );

  assign dom_rst_n = rst_n && !pso_enable;
  assign domain_on = !pso_enable && !ret_enable && !iso_enable;

  sync_fifo #(.WIDTH(CW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_valid (in_valid),
    .wr_ready (in_ready),
    .wr_data  (in_data),
    .rd_valid (fifo_valid),
    .rd_ready (domain_on && idct_in_ready),
    .rd_data  (fifo_data),
    .count    (fifo_count)
  );

  assign fifo_empty = (fifo_count == '0);

  idct_2d #(.CW(CW)) u_idct (
    .clk        (gclk),
    .rst_n      (dom_rst_n),
    .in_valid   (fifo_valid && domain_on),
    .in_ready   (idct_in_ready),
    .in_data    (fifo_data),
    .out_valid  (idct_out_valid),
    .out_ready  (out_ready),
    .out_data   (idct_out_data),
    .idle       (idct_idle),
    .block_done (idct_block_done)
  );

  retention_reg #(.WIDTH(16)) u_ret (
    .aon_clk    (clk),
    .rst_n      (rst_n),
    .clk        (gclk),
    .pwr_rst_n  (dom_rst_n),
    .ret_enable (ret_enable),
    .load       (idct_block_done),
    .d          (blocks_done + 16'd1),
    .q          (blocks_done)
  );

  iso_cell #(.WIDTH(10), .CLAMP('0)) u_iso (
    .iso_enable (iso_enable),
    .d          ({idct_out_valid, idct_idle, idct_out_data}),
    .q          ({out_valid, idle, out_data})
  );

  // Nothing may leave the domain while it is isolated.
  a_iso_blocks_out: assert property (@(posedge clk) disable iff (!rst_n)
    iso_enable |-> !out_valid);

endmodule
