// Power-aware ALU processor.
//
// Eight units - AND, OR, ADD, SUBTRACT, Shift_L, Shift_R, MULTIPLY and DIVIDE
// - work on A and B; the encoder turns SEL into a one-hot enable that picks
// one result at the output multiplexer. MULTIPLY and DIVIDE, the largest
// units, sit in two separate power-switchable domains. Each has its own
// power management block, driven by MP (multiplier) or DP (divider), its own
// clock gate stopped while the domain is off, isolation cells on its outputs,
// and is held in reset while switched off (modelling the loss of its state).
// A shut-off request is held back while its unit owns the operation in
// flight, so an accepted multiply or divide always completes.
//
// Interface: an operation is offered with op_valid and taken when op_ready is
// high. op_ready is low while a multiply or divide is in flight and while the
// selected unit's domain is not fully on. The result appears on out with a
// one-cycle out_valid pulse: one cycle after acceptance for the six basic
// operations, two for MULTIPLY and W+2 for DIVIDE. The units, the encoder,
// the multiplexer and the MP/DP power inputs follow the document; the
// handshake, the widths and the unit timing are this design's choices.
// The divider's remainder and busy outputs are left unconnected on purpose:
// the ALU returns only the quotient, and its own state machine already knows
// when the divider is running.
// Lint may report rst_n as used both as an asynchronous reset and as a
// synchronous signal: the second use is the disable condition of the
// assertions at the end; the logic itself resets asynchronously only.
module pwr_alu
  import lp_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  alu_op_e      sel,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         op_valid,
  output logic         op_ready,
  output logic [W-1:0] out,
  output logic         out_valid,
  input  logic         mp,
  input  logic         dp,
  output logic         mul_on,
  output logic         div_on,
  output logic [3:0]   mul_pwr,   // {cg, pso_enable, ret_enable, iso_enable}
  output logic [3:0]   div_pwr    // {cg, pso_enable, ret_enable, iso_enable}
);

  typedef enum logic [1:0] {
    ST_IDLE,
    ST_MUL,
    ST_DIV
  } state_e;

  state_e       state;
  logic [7:0]   en;
  logic [W-1:0] and_r, or_r, add_r, sub_r, shl_r, shr_r;
  logic         accept;

  // Multiplier domain.
  logic         mul_iso, mul_ret, mul_pso, mul_cg, mul_gclk, mul_rst_n;
  logic [W-1:0] mul_p, mul_p_iso;
  logic         mul_done, mul_done_iso;

  // Divider domain.
  logic         div_iso, div_ret, div_pso, div_cg, div_gclk, div_rst_n;
  logic [W-1:0] div_q, div_q_iso;
  logic         div_done, div_done_iso;
  logic         mul_req, div_req;

  alu_encoder u_enc (.sel(sel), .en(en));

  alu_basic_ops #(.W(W)) u_basic (
    .a(a), .b(b), .and_r(and_r), .or_r(or_r), .add_r(add_r),
    .sub_r(sub_r), .shl_r(shl_r), .shr_r(shr_r)
  );

  // A shut-off request is held back while the unit owns an operation.
  assign mul_req = mp && (state != ST_MUL) && !(accept && en[OP_MUL]);
  assign div_req = dp && (state != ST_DIV) && !(accept && en[OP_DIV]);

  // ---- MULTIPLY in its own switchable domain ----
  pmb u_pmb_mul (
    .clk(clk), .rst_n(rst_n), .enable(mul_req),
    .iso_enable(mul_iso), .ret_enable(mul_ret), .pso_enable(mul_pso), .cg(mul_cg)
  );
  clock_gate u_cg_mul (.clk(clk), .en(!mul_cg), .gclk(mul_gclk));
  assign mul_rst_n = rst_n && !mul_pso;

  alu_multiply #(.W(W)) u_mul (
    .clk(mul_gclk), .rst_n(mul_rst_n), .start(accept && en[OP_MUL]),
    .a(a), .b(b), .p(mul_p), .done(mul_done)
  );
  iso_cell #(.WIDTH(W + 1), .CLAMP('0)) u_iso_mul (
    .iso_enable(mul_iso), .d({mul_done, mul_p}), .q({mul_done_iso, mul_p_iso})
  );

  // ---- DIVIDE in its own switchable domain ----
  pmb u_pmb_div (
    .clk(clk), .rst_n(rst_n), .enable(div_req),
    .iso_enable(div_iso), .ret_enable(div_ret), .pso_enable(div_pso), .cg(div_cg)
  );
  clock_gate u_cg_div (.clk(clk), .en(!div_cg), .gclk(div_gclk));
  assign div_rst_n = rst_n && !div_pso;

  alu_divide #(.W(W)) u_div (
    .clk(div_gclk), .rst_n(div_rst_n), .start(accept && en[OP_DIV]),
    .a(a), .b(b), .q(div_q), .r(), .busy(), .done(div_done)
  );
  iso_cell #(.WIDTH(W + 1), .CLAMP('0)) u_iso_div (
    .iso_enable(div_iso), .d({div_done, div_q}), .q({div_done_iso, div_q_iso})
  );

  assign mul_on  = !mul_pso && !mul_ret && !mul_iso;
  assign div_on  = !div_pso && !div_ret && !div_iso;
  assign mul_pwr = {mul_cg, mul_pso, mul_ret, mul_iso};
  assign div_pwr = {div_cg, div_pso, div_ret, div_iso};

  // ---- issue and output multiplexer ----
  always_comb begin
    op_ready = (state == ST_IDLE);
    if (en[OP_MUL] && !mul_on) op_ready = 1'b0;
    if (en[OP_DIV] && !div_on) op_ready = 1'b0;
  end
  assign accept = op_valid && op_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        ST_IDLE: if (accept) begin
          if (en[OP_MUL])      state <= ST_MUL;
          else if (en[OP_DIV]) state <= ST_DIV;
          else begin
            out_valid <= 1'b1;
            unique case (1'b1)
              en[OP_AND]: out <= and_r;
              en[OP_OR]:  out <= or_r;
              en[OP_ADD]: out <= add_r;
              en[OP_SUB]: out <= sub_r;
              en[OP_SHL]: out <= shl_r;
              en[OP_SHR]: out <= shr_r;
              default:    out <= '0;
            endcase
          end
        end
        ST_MUL: if (mul_done_iso) begin
          out       <= mul_p_iso;
          out_valid <= 1'b1;
          state     <= ST_IDLE;
        end
        ST_DIV: if (div_done_iso) begin
          out       <= div_q_iso;
          out_valid <= 1'b1;
          state     <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // A unit must not be switched off while it owns the operation in flight.
  a_mul_on_in_flight: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_MUL) |-> !mul_pso);
  a_div_on_in_flight: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_DIV) |-> !div_pso);

endmodule
