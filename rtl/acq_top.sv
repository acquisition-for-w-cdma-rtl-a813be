// acq_top: FPGA part of the W-CDMA code acquisition.
//
// The received I/Q samples (two per chip) are correlated with a PN code by two
// inversed-type serial-to-parallel matched filters (I and Q, sharing one code
// stream). The delay profile unit turns each correlation into an energy and
// stores it in the delay profile memory, one entry per half-chip position of a
// PROFILE_LEN-sample reference period. The DSP, as bus master, loads the PN
// code, sets the search parameters, starts a run with a primitive, and reads
// back the profile to search for the multipath peaks; the peak search itself
// runs on the DSP. The DSP reaches the engine through its asynchronous external
// memory interface (EMIF); glue logic turns that into a synchronous internal
// bus and a decoder/arbiter selects the internal memory from the primitive.
//
// Ports: clk/rst_n; frame_sync marks sample position 0 of the reference
// period; rx_i/rx_q carry one sample per clock; the emif_* pins are the DSP's
// asynchronous memory interface with the bidirectional data bus split into
// in, out and output enable; acq_done is high when a run has finished (usable
// as a DSP interrupt); finger_delay/finger_load carry the path delays the
// DSP's peak search selected to the tracking unit. The tracking unit, RAKE
// fingers, combining and decoding sit outside this block.
// Timing: a run of win_count windows takes 2*win_count reference periods at
// most plus one period of waiting; see acq_controller.
// The partition (matched filter and delay profile in hardware, peak search in
// the DSP), the filter structure, TAPS = 128 and the memory-mapped DSP
// interface follow the source design; the rest is this design's own.
module acq_top
  import acq_pkg::*;
#(
  parameter int TAPS        = 128,
  parameter int CODE_LEN    = 256,
  parameter int DW          = 6,
  parameter int PROFILE_LEN = 2048,
  parameter int NFING       = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 frame_sync,
  input  logic signed [DW-1:0] rx_i,
  input  logic signed [DW-1:0] rx_q,
  input  logic                 emif_ce_n,
  input  logic                 emif_are_n,
  input  logic                 emif_awe_n,
  input  logic [BUS_AW-1:0]    emif_ea,
  input  logic [BUS_DW-1:0]    emif_ed_in,
  output logic [BUS_DW-1:0]    emif_ed_out,
  output logic                 emif_ed_oe,
  output logic                 acq_done,
  // to the tracking unit: path delays chosen by the DSP (half-chip positions)
  output logic [$clog2(PROFILE_LEN)-1:0] finger_delay [NFING],
  output logic                 finger_load
);
  localparam int ACCW    = DW + $clog2(CODE_LEN) + 1;
  localparam int SEGW    = $clog2(CODE_LEN / TAPS) + 1;
  localparam int PAW     = $clog2(PROFILE_LEN);
  localparam int CODE_AW = $clog2(CODE_LEN);
  localparam int IDXW    = $clog2(TAPS);
  localparam int WINW    = $clog2(PROFILE_LEN / (2 * TAPS)) > 0 ? $clog2(PROFILE_LEN / (2 * TAPS)) : 1;

  // Internal bus
  bus_req_t            bus_req;
  logic [BUS_DW-1:0]   bus_rdata;
  logic                bc_en, bc_we, bc_wdata, bc_rdata;
  logic [CODE_AW-1:0]  bc_addr;
  logic                bp_en;
  logic [PAW-1:0]      bp_addr;
  logic [BUS_DW-1:0]   bp_rdata;

  // Control
  logic                acq_start, acq_busy;
  logic [WINW-1:0]     win_first;
  logic [WINW:0]       win_count;
  logic [SEGW-1:0]     segs;

  // Datapath
  logic                code_rd, code_bit, mf_start, mf_en;
  logic [CODE_AW-1:0]  code_addr;
  logic [PAW-1:0]      pass_base;
  logic signed [DW-1:0] d_i_q, d_q_q;
  logic                cv_i, cv_q;
  logic signed [ACCW-1:0] corr_i, corr_q;
  logic [IDXW-1:0]     idx_i, idx_q;
  logic                prof_we;
  logic [PAW-1:0]      prof_addr;
  logic [BUS_DW-1:0]   prof_data;

  emif_glue u_glue (
    .clk, .rst_n,
    .ce_n(emif_ce_n), .are_n(emif_are_n), .awe_n(emif_awe_n),
    .ea(emif_ea), .ed_in(emif_ed_in), .ed_out(emif_ed_out), .ed_oe(emif_ed_oe),
    .bus_req, .bus_rdata
  );

  decoder_arbiter #(.CODE_AW(CODE_AW), .PROF_AW(PAW), .WINW(WINW), .SEGW(SEGW), .NFING(NFING)) u_dec (
    .clk, .rst_n, .bus_req, .bus_rdata,
    .code_en(bc_en), .code_we(bc_we), .code_addr(bc_addr), .code_wdata(bc_wdata),
    .code_rdata(bc_rdata),
    .prof_en(bp_en), .prof_addr(bp_addr), .prof_rdata(bp_rdata),
    .acq_start, .win_first, .win_count, .segs,
    .acq_busy, .acq_done, .prim(), .finger_delay, .finger_load
  );

  // PN code memory: one chip per word (bit 0 = +1, bit 1 = -1).
  int_mem #(.DEPTH(CODE_LEN), .WIDTH(1)) u_code_mem (
    .clk,
    .a_en(bc_en), .a_we(bc_we), .a_addr(bc_addr), .a_wdata(bc_wdata), .a_rdata(bc_rdata),
    .b_en(code_rd), .b_we(1'b0), .b_addr(code_addr), .b_wdata(1'b0), .b_rdata(code_bit)
  );

  // Delay profile memory: one energy per half-chip position.
  int_mem #(.DEPTH(PROFILE_LEN), .WIDTH(BUS_DW)) u_prof_mem (
    .clk,
    .a_en(bp_en), .a_we(1'b0), .a_addr(bp_addr), .a_wdata('0), .a_rdata(bp_rdata),
    .b_en(prof_we), .b_we(prof_we), .b_addr(prof_addr), .b_wdata(prof_data), .b_rdata()
  );

  acq_controller #(.TAPS(TAPS), .CODE_LEN(CODE_LEN), .PROFILE_LEN(PROFILE_LEN)) u_ctrl (
    .clk, .rst_n, .frame_sync,
    .start(acq_start), .win_first, .win_count, .segs,
    .busy(acq_busy), .done(acq_done),
    .code_rd, .code_addr, .mf_start, .mf_en, .pass_base
  );

  // Sample register: lines the samples up with the code memory's read data.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_i_q <= '0;
      d_q_q <= '0;
    end else begin
      d_i_q <= rx_i;
      d_q_q <= rx_q;
    end
  end

  sp_matched_filter #(.TAPS(TAPS), .CODE_LEN(CODE_LEN), .DW(DW)) u_mf_i (
    .clk, .rst_n, .start(mf_start), .en(mf_en), .d_in(d_i_q), .c_in(code_bit), .segs,
    .corr_valid(cv_i), .corr(corr_i), .corr_idx(idx_i), .busy()
  );

  sp_matched_filter #(.TAPS(TAPS), .CODE_LEN(CODE_LEN), .DW(DW)) u_mf_q (
    .clk, .rst_n, .start(mf_start), .en(mf_en), .d_in(d_q_q), .c_in(code_bit), .segs,
    .corr_valid(cv_q), .corr(corr_q), .corr_idx(idx_q), .busy()
  );

  delay_profile_unit #(.ACCW(ACCW), .IDXW(IDXW), .PAW(PAW), .OUTW(BUS_DW)) u_dpu (
    .clk, .rst_n, .corr_valid(cv_i), .corr_i, .corr_q, .corr_idx(idx_i), .pass_base,
    .prof_we, .prof_addr, .prof_data
  );

  // The two filters run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) cv_i == cv_q && (!cv_i || idx_i == idx_q));

endmodule
