// tb_acq_top: end-to-end test of the acquisition engine at its default size
// (TAPS=128, CODE_LEN=256, PROFILE_LEN=2048, DW=6).
// A DSP model drives the asynchronous EMIF pins (strobes placed off the FPGA
// clock edges). The received signal is periodic with one reference period of
// 2048 samples (1024 chips, two samples per chip): the 256-chip PN code
// followed by random chips, sent over four paths with different delays and
// complex gains, plus noise. The test loads the code, checks it by reading it
// back, starts a full-profile run (8 windows, 2 code segments), provokes a bus
// conflict during the run, reads the 2048-entry profile and compares every
// entry with energies computed here from the same samples, and checks that the
// four path delays are the strongest positions. A second run with other
// parameters (one segment, windows 3..4) checks that only those entries change.
// The four strongest profile peaks are then written as finger delays and
// must appear on the ports to the tracking unit.
// Mechanisms counted: finger hand-overs, primitive switches, code-segment reloads, both sample
// phases, bus conflicts, frame syncs, runs.
module tb_acq_top;
  import acq_pkg::*;
  localparam int TAPS = 128, CODE_LEN = 256, DW = 6, L = 2048;
  localparam int NPATH = 4;

  logic clk = 0, rst_n = 0, frame_sync = 0;
  logic signed [DW-1:0] rx_i = '0, rx_q = '0;
  logic emif_ce_n = 1, emif_are_n = 1, emif_awe_n = 1;
  logic [BUS_AW-1:0] emif_ea = '0;
  logic [BUS_DW-1:0] emif_ed_in = '0, emif_ed_out;
  logic emif_ed_oe, acq_done;
  logic [10:0] finger_delay [4];
  logic finger_load;
  int n_finger_load = 0;
  always @(posedge clk) if (rst_n && finger_load) n_finger_load++;

  int checks = 0, failures = 0;
  int cycle = 0;

  acq_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // ---------------- received signal ----------------
  bit code [CODE_LEN];
  int sig_i [L], sig_q [L];
  int path_d [NPATH] = '{46, 561, 1074, 1583};
  int path_ai [NPATH] = '{3, -2, 4, 1};
  int path_aq [NPATH] = '{-1, 3, 1, 5};

  function automatic int sat(input int v);
    if (v > 31) return 31;
    if (v < -32) return -32;
    return v;
  endfunction

  initial begin
    int chip [L/2];
    for (int i = 0; i < CODE_LEN; i++) code[i] = 1'($urandom);
    for (int c = 0; c < L/2; c++)
      chip[c] = (c < CODE_LEN) ? (code[c] ? -1 : 1) : (($urandom_range(0, 1) == 1) ? -1 : 1);
    for (int s = 0; s < L; s++) begin
      int vi, vq;
      vi = $urandom_range(0, 4) - 2;
      vq = $urandom_range(0, 4) - 2;
      for (int p = 0; p < NPATH; p++) begin
        int x;
        x = chip[((s - path_d[p] + L) % L) / 2];
        vi += path_ai[p] * x;
        vq += path_aq[p] * x;
      end
      sig_i[s] = sat(vi);
      sig_q[s] = sat(vq);
    end
  end

  // Sample stream: one sample per clock, frame_sync at position 0.
  int scnt = 0;
  int n_frame_sync = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      rx_i       <= DW'(sig_i[scnt]);
      rx_q       <= DW'(sig_q[scnt]);
      frame_sync <= (scnt == 0);
      if (scnt == 0) n_frame_sync++;
      scnt       <= (scnt + 1) % L;
    end
  end

  // Expected energy at sample position x with m chips of code.
  function automatic longint exp_energy(input int x, input int m);
    longint ci = 0, cq = 0;
    for (int i = 0; i < m; i++) begin
      int s;
      s = (x + 2*i) % L;
      ci += code[i] ? -longint'(sig_i[s]) : longint'(sig_i[s]);
      cq += code[i] ? -longint'(sig_q[s]) : longint'(sig_q[s]);
    end
    return ci*ci + cq*cq;
  endfunction

  // ---------------- DSP model (EMIF asynchronous accesses) ----------------
  task automatic emif_write(input logic [BUS_AW-1:0] a, input logic [BUS_DW-1:0] d);
    @(posedge clk); #3;
    emif_ea = a; emif_ed_in = d; emif_ce_n = 0;
    #7 emif_awe_n = 0;
    repeat (5) @(posedge clk);
    #4 emif_awe_n = 1;
    #3 emif_ce_n = 1;
    repeat (2) @(posedge clk);
  endtask

  task automatic emif_read(input logic [BUS_AW-1:0] a, output logic [BUS_DW-1:0] d);
    @(posedge clk); #2;
    emif_ea = a; emif_ce_n = 0;
    #6 emif_are_n = 0;
    repeat (8) @(posedge clk);
    #1;
    if (!emif_ed_oe) begin
      failures++;
      $display("FAIL: ed_oe low during read strobe");
    end
    d = emif_ed_out;
    emif_are_n = 1;
    #2 emif_ce_n = 1;
    #1;
    if (emif_ed_oe) begin
      failures++;
      $display("FAIL: ed_oe high after read strobe");
    end
    repeat (2) @(posedge clk);
  endtask

  function automatic logic [BUS_AW-1:0] reg_addr(input logic [3:0] off);
    return {1'b1, {(BUS_AW-5){1'b0}}, off};
  endfunction

  // ---------------- mechanism counters ----------------
  int n_prim_switch = 0, n_seg_reload = 0, n_phase0 = 0, n_phase1 = 0;
  int n_conflict = 0, n_runs = 0;
  prim_e prim_prev = PRIM_IDLE;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dec.prim != prim_prev) n_prim_switch++;
    prim_prev <= dut.u_dec.prim;
    // A tap reloaded with chip TAPS or later: a new code segment.
    if (dut.u_mf_i.active && !dut.u_mf_i.start && dut.u_mf_i.ld_en_q[0] &&
        int'(dut.u_mf_i.k) > TAPS && dut.u_mf_i.k <= dut.u_mf_i.mlen) n_seg_reload++;
    if (dut.mf_start) begin
      if (dut.pass_base[0]) n_phase1++; else n_phase0++;
    end
    if (dut.acq_start) n_runs++;
  end

  // ---------------- test sequence ----------------
  initial begin
    logic [BUS_DW-1:0] rd;
    longint prof [L];
    longint e;
    int t0, t1, m;
    bit ok;

    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);

    // Load the PN code.
    emif_write(reg_addr(REG_PRIM), BUS_DW'(PRIM_LOAD_CODE));
    for (int i = 0; i < CODE_LEN; i++) emif_write(BUS_AW'(i), BUS_DW'(code[i]));
    for (int i = 0; i < CODE_LEN; i += 17) begin
      emif_read(BUS_AW'(i), rd);
      check(rd == BUS_DW'(code[i]), $sformatf("code word %0d read back %0h", i, rd));
    end

    // Parameters and start of a full-profile run.
    emif_write(reg_addr(REG_WIN_FIRST), 0);
    emif_write(reg_addr(REG_WIN_COUNT), 8);
    emif_write(reg_addr(REG_SEGS), 2);
    emif_read(reg_addr(REG_SEGS), rd);
    check(rd == 2, "segs register read back");
    emif_write(reg_addr(REG_PRIM), BUS_DW'(PRIM_START_ACQ));
    t0 = cycle;
    emif_read(reg_addr(REG_STATUS), rd);
    check(rd[0] == 1'b1 && rd[1] == 1'b0, $sformatf("status during run %0h", rd));
    // A window access during the run must be refused and flagged.
    emif_write(reg_addr(REG_PRIM), BUS_DW'(PRIM_LOAD_CODE));
    emif_write(BUS_AW'(5), BUS_DW'(!code[5]));
    emif_read(reg_addr(REG_STATUS), rd);
    check(rd[2] == 1'b1, "conflict flagged");
    if (rd[2]) n_conflict++;
    emif_write(reg_addr(REG_STATUS), 0);
    emif_write(reg_addr(REG_PRIM), BUS_DW'(PRIM_START_ACQ));
    wait (acq_done);
    t1 = cycle;
    $display("run 1 took %0d clocks", t1 - t0);
    // Every run waits at most one period for its start position and then
    // takes 2*(M+TAPS+1) samples; a run of one phase never fits in the gap
    // before the next, so 16 runs take at most 17 periods plus the last run.
    check(t1 - t0 <= 17 * L + 2 * (2 * TAPS + TAPS + 1) + 16,
          $sformatf("run 1 took %0d clocks", t1 - t0));
    check(t1 - t0 >= 15 * L, $sformatf("run 1 took only %0d clocks", t1 - t0));
    emif_read(reg_addr(REG_STATUS), rd);
    check(rd[1:0] == 2'b10 && rd[2] == 1'b0, $sformatf("status after run %0h", rd));

    // The refused write must not have changed the code.
    emif_write(reg_addr(REG_PRIM), BUS_DW'(PRIM_LOAD_CODE));
    emif_read(BUS_AW'(5), rd);
    check(rd == BUS_DW'(code[5]), "code unchanged by refused write");

    // Read the delay profile and compare.
    emif_write(reg_addr(REG_PRIM), BUS_DW'(PRIM_READ_PROFILE));
    for (int x = 0; x < L; x++) begin
      emif_read(BUS_AW'(x), rd);
      prof[x] = longint'(rd);
      e = exp_energy(x, 2 * TAPS);
      check(prof[x] == e, $sformatf("profile[%0d] = %0d, expected %0d", x, prof[x], e));
    end
    // The path delays must stand out of the profile.
    for (int p = 0; p < NPATH; p++) begin
      ok = 1;
      for (int x = 0; x < L; x++) begin
        bit near;
        near = 0;
        for (int q = 0; q < NPATH; q++)
          if ((x - path_d[q] + L) % L <= 2 || (path_d[q] - x + L) % L <= 2) near = 1;
        if (!near && prof[x] >= prof[path_d[p]]) ok = 0;
      end
      check(ok, $sformatf("path at %0d not a peak", path_d[p]));
    end

    // DSP peak search model: the four strongest local maxima become the
    // finger delays handed to the tracking unit.
    begin
      int best [4];
      bit used [L];
      for (int x = 0; x < L; x++) used[x] = 0;
      for (int f = 0; f < 4; f++) begin
        longint bv;
        bv = -1;
        best[f] = 0;
        for (int x = 0; x < L; x++)
          if (!used[x] && prof[x] > bv) begin bv = prof[x]; best[f] = x; end
        for (int dx = -3; dx <= 3; dx++) used[(best[f] + dx + L) % L] = 1;
        emif_write(reg_addr(REG_FINGER0 + 4'(f)), BUS_DW'(best[f]));
      end
      for (int f = 0; f < 4; f++) begin
        bit found;
        found = 0;
        // With two samples per chip a path is fully aligned at its delay and
        // one sample later, so either position counts.
        for (int p = 0; p < NPATH; p++)
          if (int'(finger_delay[f]) - path_d[p] inside {0, 1}) found = 1;
        check(found && int'(finger_delay[f]) == best[f], $sformatf("finger %0d delay %0d", f, finger_delay[f]));
      end
    end

    // Second run: one code segment, windows 3 and 4 only.
    emif_write(reg_addr(REG_WIN_FIRST), 3);
    emif_write(reg_addr(REG_WIN_COUNT), 2);
    emif_write(reg_addr(REG_SEGS), 1);
    emif_write(reg_addr(REG_PRIM), BUS_DW'(PRIM_START_ACQ));
    wait (!acq_done);
    wait (acq_done);
    emif_write(reg_addr(REG_PRIM), BUS_DW'(PRIM_READ_PROFILE));
    for (int x = 2 * 2 * TAPS; x < L; x += 7) begin
      m = (x >= 3 * 2 * TAPS && x < 5 * 2 * TAPS) ? TAPS : 2 * TAPS;
      emif_read(BUS_AW'(x), rd);
      e = exp_energy(x, m);
      check(longint'(rd) == e, $sformatf("run 2 profile[%0d] = %0d, expected %0d", x, rd, e));
    end

    $display("mechanisms: prim switches %0d, segment reloads %0d, phase0 runs %0d, phase1 runs %0d, conflicts %0d, frame syncs %0d, acquisitions %0d, finger loads %0d",
             n_prim_switch, n_seg_reload, n_phase0, n_phase1, n_conflict, n_frame_sync, n_runs, n_finger_load);
    check(n_prim_switch > 0, "primitive switch never happened");
    check(n_seg_reload > 0, "code segment reload never happened");
    check(n_phase0 == 10 && n_phase1 == 10, "matched-filter runs per phase");
    check(n_conflict > 0, "bus conflict never happened");
    check(n_frame_sync > 0, "frame sync never happened");
    check(n_runs == 2, "acquisition runs");
    check(n_finger_load == 4, "finger delays handed to the tracking unit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
