// Power management block (PMB) for one power-switchable domain.
//
// The PMB sits in the always-on domain. From a single request input, enable
// (1 = the domain may be shut off, 0 = it is needed), it produces the power
// control signals in the order that keeps the domain's state and its
// neighbours safe:
//   power-down: iso_enable, one cycle later ret_enable, one cycle later
//               pso_enable together with cg (clock stopped);
//   power-up:   pso_enable and cg drop, one cycle later ret_enable, one cycle
//               later iso_enable.
// The behaviour is a cycle-by-cycle reading of a clocked thread with two
// wait() calls per pass: enable is sampled every second cycle, and a sequence
// that has started runs to its end before enable is looked at again. When
// the last step of one sequence and the first step of the next fall on the
// same cycle, the later write wins, exactly as in the thread.
//
// Polarity: pso_enable = 1 means the domain is switched off and cg = 1 means
// its clock is stopped. All outputs are registered and are 0 (domain on)
// after reset. The reset value and the active-high pso_enable follow the
// sequencing algorithm; the async active-low reset is this design's choice.
// Lint may report rst_n as used both as an asynchronous reset and as a
// synchronous signal: the second use is the disable condition of the
// assertions at the end; the logic itself resets asynchronously only.
module pmb (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  output logic iso_enable,
  output logic ret_enable,
  output logic pso_enable,
  output logic cg
);

  typedef enum logic [1:0] {
    S_INIT,   // the initial wait() after reset
    S_CHECK,  // finish the previous pass (if any) and sample enable
    S_MID     // second step of the pass
  } state_e;

  typedef enum logic [1:0] {
    DIR_NONE,
    DIR_DOWN,
    DIR_UP
  } dir_e;

  state_e state;
  dir_e   dir;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_INIT;
      dir        <= DIR_NONE;
      iso_enable <= 1'b0;
      ret_enable <= 1'b0;
      pso_enable <= 1'b0;
      cg         <= 1'b0;
    end else begin
      unique case (state)
        S_INIT: state <= S_CHECK;
        S_MID: begin
          // Second step of the pass.
          if (dir == DIR_DOWN) ret_enable <= 1'b1;
          else                 ret_enable <= 1'b0;
          state <= S_CHECK;
        end
        S_CHECK: begin
          // Third step of the previous pass...
          if (dir == DIR_DOWN) begin
            pso_enable <= 1'b1;
            cg         <= 1'b1;
          end else if (dir == DIR_UP) begin
            iso_enable <= 1'b0;
          end
          // ...then the first step of the next pass (later writes win).
          if (enable) begin
            iso_enable <= 1'b1;
            dir        <= DIR_DOWN;
          end else begin
            cg         <= 1'b0;
            pso_enable <= 1'b0;
            dir        <= DIR_UP;
          end
          state <= S_MID;
        end
        default: state <= S_CHECK;
      endcase
    end
  end

  // The domain is never switched off without isolation and retention.
  a_pso_needs_iso: assert property (@(posedge clk) disable iff (!rst_n)
    pso_enable |-> (iso_enable && ret_enable));
  // The clock is stopped exactly while the domain is off.
  a_cg_follows_pso: assert property (@(posedge clk) disable iff (!rst_n)
    cg == pso_enable);

endmodule
