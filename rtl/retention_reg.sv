// Behavioural model of a bank of state-retention flip-flops.
//
// A retention flip-flop is a process cell with a small always-on "balloon"
// latch beside the normal flip-flop; it is normally inserted from the power
// intent rather than written in RTL. This model has the same ports and
// timing as such a bank seen from the logic:
//   * q is an ordinary register on the domain's (gated) clock, loaded with d
//     when load is high, and lost (cleared) while pwr_rst_n is low, which is
//     how the switched-off domain is modelled;
//   * shadow, on the always-on clock, follows q while ret_enable is low and
//     is frozen while ret_enable is high;
//   * while ret_enable is high and the domain clock runs, q reloads shadow,
//     so it holds its value during power-down and gets it back during
//     power-up, before ret_enable falls.
module retention_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             aon_clk,     // always-on clock
  input  logic             rst_n,       // always-on reset, active low
  input  logic             clk,         // domain (gated) clock
  input  logic             pwr_rst_n,   // low while the domain is without power
  input  logic             ret_enable,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] shadow;

  always_ff @(posedge aon_clk or negedge rst_n) begin
    if (!rst_n)           shadow <= '0;
    else if (!ret_enable) shadow <= q;
  end

  always_ff @(posedge clk or negedge pwr_rst_n) begin
    if (!pwr_rst_n)      q <= '0;
    else if (ret_enable) q <= shadow;
    else if (load)       q <= d;
  end

endmodule
