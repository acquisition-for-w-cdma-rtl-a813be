// acq_controller: sequences the matched-filter runs of one acquisition.
//
// The received signal arrives at two samples per chip, one sample per clock,
// and a free-running sample counter (cleared by frame_sync) gives every sample
// its position in a PROFILE_LEN-sample reference period. The delay profile has
// one entry per sample position, i.e. half-chip resolution. The matched filter
// works at chip rate on every second sample, so one run covers TAPS chip-spaced
// positions of one sample phase: window w, phase p covers the positions
// 2*(w*TAPS + tau) + p for tau = 0..TAPS-1. For every window from win_first on
// (win_count windows) the controller runs phase 0 and then phase 1.
// A run waits until the sample at position 2*w*TAPS + p arrives, then feeds
// the filter every second sample while reading the PN code memory one chip per
// fed sample (chip t at the t-th fed sample), for segs*TAPS + TAPS + 1 fed
// samples, and then pauses three clocks so that the last results are written
// before the next run changes pass_base.
// Interface timing: code_rd/code_addr are combinational; mf_en and mf_start
// are registered so that they line up with the memory's read data and with
// the sample register in the top. busy is high from start to the end of the
// last run; done rises then and stays until the next start.
// The source design says that the DSP's primitives and parameters tell the
// engine what to compute and that the serial-parallel filter is reloaded with
// successive code segments; the window/phase schedule is this design's own.
module acq_controller #(
  parameter int TAPS        = 128,
  parameter int CODE_LEN    = 256,
  parameter int PROFILE_LEN = 2048,     // samples per reference period (power of 2)
  parameter int PAW         = $clog2(PROFILE_LEN),
  parameter int WINW        = $clog2(PROFILE_LEN / (2 * TAPS)) > 0 ? $clog2(PROFILE_LEN / (2 * TAPS)) : 1,
  parameter int SEGW        = $clog2(CODE_LEN / TAPS) + 1,
  parameter int CODE_AW     = $clog2(CODE_LEN)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               frame_sync,
  input  logic               start,
  input  logic [WINW-1:0]    win_first,
  input  logic [WINW:0]      win_count,
  input  logic [SEGW-1:0]    segs,
  output logic               busy,
  output logic               done,
  output logic               code_rd,
  output logic [CODE_AW-1:0] code_addr,
  output logic               mf_start,
  output logic               mf_en,
  output logic [PAW-1:0]     pass_base
);
  localparam int CW = $clog2(CODE_LEN + TAPS + 2) + 1;
  localparam int SEGS_MAX = CODE_LEN / TAPS;

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_RUN, S_GAP} state_e;

  state_e          state_q;
  logic [PAW-1:0]  scnt_q, cur, target;
  logic [WINW-1:0] w_q;
  logic            p_q;
  logic [WINW:0]   left_q;
  logic [CW-1:0]   t_q, mlen;
  logic            half_q;
  logic [1:0]      gap_q;
  logic            take, first;

  always_comb begin
    logic [SEGW-1:0] s;
    s = segs;
    if (s == '0) s = SEGW'(1);
    if (int'(s) > SEGS_MAX) s = SEGW'(SEGS_MAX);
    mlen = CW'(s) * CW'(TAPS);
  end

  assign cur    = frame_sync ? '0 : scnt_q;
  assign target = PAW'((PAW+WINW+1)'(w_q) * (PAW+WINW+1)'(2 * TAPS)) + PAW'(p_q);
  assign first  = (state_q == S_WAIT) && (cur == target);
  assign take   = first || ((state_q == S_RUN) && !half_q);

  assign code_rd   = take;
  assign code_addr = (!first && t_q < mlen) ? CODE_AW'(t_q) : '0;
  assign busy      = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      scnt_q    <= '0;
      w_q       <= '0;
      p_q       <= 1'b0;
      left_q    <= '0;
      t_q       <= '0;
      half_q    <= 1'b0;
      gap_q     <= '0;
      done      <= 1'b0;
      mf_en     <= 1'b0;
      mf_start  <= 1'b0;
      pass_base <= '0;
    end else begin
      scnt_q   <= cur + PAW'(1);
      mf_en    <= take;
      mf_start <= first;
      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            done   <= 1'b0;
            w_q    <= win_first;
            p_q    <= 1'b0;
            left_q <= win_count;
            if (win_count == '0) done <= 1'b1;
            else                 state_q <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (first) begin
            pass_base <= target;
            t_q       <= CW'(1);
            half_q    <= 1'b1;
            state_q   <= S_RUN;
          end
        end
        S_RUN: begin
          half_q <= !half_q;
          if (!half_q) begin
            t_q <= t_q + CW'(1);
            if (t_q == mlen + CW'(TAPS)) begin
              state_q <= S_GAP;
              gap_q   <= 2'd2;
            end
          end
        end
        S_GAP: begin
          gap_q <= gap_q - 2'd1;
          if (gap_q == 2'd0) begin
            if (!p_q) begin
              p_q     <= 1'b1;
              state_q <= S_WAIT;
            end else begin
              p_q    <= 1'b0;
              w_q    <= w_q + WINW'(1);
              left_q <= left_q - (WINW+1)'(1);
              if (left_q == (WINW+1)'(1)) begin
                state_q <= S_IDLE;
                done    <= 1'b1;
              end else begin
                state_q <= S_WAIT;
              end
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The schedule needs a power-of-two reference period.
  initial assert ((1 << PAW) == PROFILE_LEN);

endmodule
