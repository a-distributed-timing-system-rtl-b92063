// user_timer_channel: one programmable, retriggerable one-shot timing output.
//
// A user timing signal is a pulse that starts a programmed delay after the
// system trigger and lasts a programmed width, both 16-bit counts of the
// selected source; with the 5 MHz system clock as source the resolution is
// 200 ns and the limit of each is 65535 ticks (13.1 ms). The active sense
// selects an active-high or active-low output. The system trigger is the
// gate: each accepted trigger restarts the delay, also while a pulse is in
// progress. With evnt = N > 1 only every Nth trigger is accepted (a channel at
// a submultiple of the trigger rate); the trigger divider is cleared by the
// time tag reset so every module running the same N fires on the same
// triggers. Delays relative to another channel are computed by software as
// an absolute delay, so the channel only ever counts from the trigger.
//
// This models the one operating mode of the original counter/timer chip that
// the system uses; the state machine, the divider phasing and the moment of
// the done pulse are this design's own choices.
//
// Timing (system clock source): with the trigger pulse in cycle T the output
// is active in cycles T+2+delay .. T+1+delay+width. done pulses for one cycle
// after the last active cycle. Other sources count one tick per source event.
module user_timer_channel
  import timing_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  chan_cfg_t  cfg,
  input  logic       gate,       // system trigger pulse
  input  logic       phase_rst,  // time tag reset pulse: clears the divider
  input  logic [4:0] src_ev,     // source event pulses, indexed by count_src_e
  output logic       out,        // timing output with programmed sense
  output logic       active,     // pulse in progress (active-high view)
  output logic       done        // pulse: a pulse has just ended
);
  typedef enum logic [1:0] {S_IDLE, S_DELAY, S_ACTIVE} state_e;

  state_e           state;
  logic [CNT_W-1:0] cnt;
  logic [7:0]       divcnt, div_now;
  logic             fire, tick;

  always_comb begin
    unique case (cfg.src)
      SRC_SYSCLK: tick = src_ev[0];
      SRC_TAGCLK: tick = src_ev[1];
      SRC_TAGRST: tick = src_ev[2];
      SRC_TRIG:   tick = src_ev[3];
      SRC_EXT:    tick = src_ev[4];
      default:    tick = 1'b0;
    endcase
    div_now = phase_rst ? 8'd0 : divcnt;
    fire    = cfg.enable && gate && (cfg.evnt <= 8'd1 || div_now == 8'd0);
    active  = (state == S_ACTIVE);
    out     = cfg.sense ? active : !active;
  end

  // trigger divider for evnt > 1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) divcnt <= '0;
    else if (gate && cfg.evnt > 8'd1)
      divcnt <= (div_now >= cfg.evnt - 8'd1) ? 8'd0 : div_now + 8'd1;
    else if (phase_rst)
      divcnt <= '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!cfg.enable) begin
        state <= S_IDLE;
      end else if (fire) begin
        state <= S_DELAY;
        cnt   <= cfg.delay;
      end else if (tick) begin
        unique case (state)
          S_DELAY:
            if (cnt == '0) begin
              if (cfg.width == '0) state <= S_IDLE;
              else begin
                state <= S_ACTIVE;
                cnt   <= cfg.width - 1'b1;
              end
            end else cnt <= cnt - 1'b1;
          S_ACTIVE:
            if (cnt == '0) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else cnt <= cnt - 1'b1;
          default: ;
        endcase
      end
    end
  end
endmodule
