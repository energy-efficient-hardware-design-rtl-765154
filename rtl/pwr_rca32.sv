// Power-aware 32-bit ripple-carry adder.
//
// Two 16-bit ripple-carry adders: LSB_RCA adds bits 0-15 with the carry-in
// and stays on; MSB_RCA adds bits 16-31 with LSB_RCA's carry and lives in a
// power-switchable domain. P_shut-off (p_shutoff) is the request of a power
// management block, which drives the domain's isolation, retention and
// power-switch controls, and it also selects the two output multiplexers:
//   p_shutoff = 0: 32-bit mode, sum = {MSB sum, LSB sum}, cout = MSB carry;
//   p_shutoff = 1: 16-bit mode, sum = {16'b0, LSB sum}, cout = LSB carry.
// MSB_RCA's outputs pass through isolation cells (clamped to 0 while
// iso_enable is high). Because the multiplexers follow p_shutoff directly,
// after p_shutoff falls the upper half reads 0 until the power-up sequence
// has lowered iso_enable (about four cycles); msb_on shows when the 32-bit
// result is valid. The adders are combinational; only the power management
// block is clocked. The split and the multiplexers follow the document; the
// zero upper half in 16-bit mode and msb_on are this design's choices.
module pwr_rca32 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        p_shutoff,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  output logic [31:0] sum,
  output logic        cout,
  output logic        msb_on,
  output logic        iso_enable,
  output logic        ret_enable,
  output logic        pso_enable,
  output logic        cg
);

  logic [15:0] lsb_s;
  logic        lsb_c;
  logic [15:0] msb_s;
  logic        msb_c;
  logic [15:0] msb_s_iso;
  logic        msb_c_iso;

  pmb u_pmb (
    .clk        (clk),
    .rst_n      (rst_n),
    .enable     (p_shutoff),
    .iso_enable (iso_enable),
    .ret_enable (ret_enable),
    .pso_enable (pso_enable),
    .cg         (cg)
  );

  rca16 #(.W(16)) u_lsb_rca (
    .a  (a[15:0]),
    .b  (b[15:0]),
    .ci (cin),
    .s  (lsb_s),
    .co (lsb_c)
  );

  rca16 #(.W(16)) u_msb_rca (
    .a  (a[31:16]),
    .b  (b[31:16]),
    .ci (lsb_c),
    .s  (msb_s),
    .co (msb_c)
  );

  iso_cell #(.WIDTH(17), .CLAMP('0)) u_iso (
    .iso_enable (iso_enable),
    .d          ({msb_c, msb_s}),
    .q          ({msb_c_iso, msb_s_iso})
  );

  always_comb begin
    if (p_shutoff) begin
      sum  = {16'h0000, lsb_s};
      cout = lsb_c;
    end else begin
      sum  = {msb_s_iso, lsb_s};
      cout = msb_c_iso;
    end
  end

  assign msb_on = !pso_enable && !ret_enable && !iso_enable && !p_shutoff;

endmodule
