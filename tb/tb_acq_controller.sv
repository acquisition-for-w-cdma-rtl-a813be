// tb_acq_controller: self-checking test of the run sequencer at TAPS=4,
// CODE_LEN=16, PROFILE_LEN=64. A model checks every clock: code_addr must
// count 0,1,2.. within a run and be read on every second sample; mf_en and
// mf_start must follow one clock later; each run must start exactly when the
// sample counter (cleared by frame_sync) reaches 2*w*TAPS + phase, phases 0
// then 1 for every window in turn, with pass_base equal to that position; each
// run must feed segs*TAPS+TAPS+1 samples; busy and done must frame the whole
// acquisition. Several parameter sets and window wrap-around are used.
module tb_acq_controller;
  localparam int TAPS = 4, CODE_LEN = 16, L = 64;
  localparam int PAW = 6, WINW = 3, SEGW = 3, CODE_AW = 4;

  logic clk = 0, rst_n = 0, frame_sync = 0, start = 0;
  logic [WINW-1:0] win_first = '0;
  logic [WINW:0] win_count = '0;
  logic [SEGW-1:0] segs = '0;
  logic busy, done, code_rd, mf_start, mf_en;
  logic [CODE_AW-1:0] code_addr;
  logic [PAW-1:0] pass_base;
  int checks = 0, failures = 0;

  acq_controller #(.TAPS(TAPS), .CODE_LEN(CODE_LEN), .PROFILE_LEN(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sample position of the sample present at each clock edge.
  int pos = 0;
  always @(negedge clk) begin
    frame_sync <= ($urandom_range(0, 500) == 0);   // occasional resynchronisation
  end

  // Run log filled by the checker.
  int run_pos [$];
  int run_len [$];
  int run_base [$];
  int feeds = 0, chip = 0, last_take = -10, cyc = 0;
  bit prev_take = 0, prev_first = 0, in_run = 0;

  always @(posedge clk) if (rst_n) begin
    int p;
    p = frame_sync ? 0 : pos;
    cyc++;
    checks++;
    if (mf_en != prev_take || mf_start != prev_first) begin
      failures++; $display("mf_en/mf_start not one clock after code_rd");
    end
    prev_take  = code_rd;
    prev_first = code_rd && !in_run;
    if (code_rd) begin
      if (!in_run) begin
        in_run = 1;
        run_pos.push_back(p);
        chip = 0;
        feeds = 0;
      end else begin
        checks++;
        if (cyc - last_take != 2) begin failures++; $display("feeds not every second sample"); end
      end
      checks++;
      if (chip < int'(segs) * TAPS && code_addr != CODE_AW'(chip)) begin
        failures++; $display("code_addr %0d expected %0d", code_addr, chip);
      end
      chip++;
      feeds++;
      last_take = cyc;
    end else if (in_run && cyc - last_take > 1) begin
      in_run = 0;
      run_len.push_back(feeds);
    end
    if (mf_start) run_base.push_back(int'(pass_base));
    pos = (p + 1) % L;
  end

  task automatic acquire(input int first, input int count, input int sg);
    int t0;
    run_pos.delete(); run_len.delete(); run_base.delete();
    @(negedge clk);
    win_first = WINW'(first); win_count = (WINW+1)'(count); segs = SEGW'(sg);
    start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (!busy || done) begin failures++; $display("busy/done after start"); end
    t0 = cyc;
    while (!done) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("busy with done"); end
    checks++;
    if (run_pos.size() != 2 * count || run_len.size() != 2 * count) begin
      failures++; $display("%0d runs, expected %0d", run_pos.size(), 2 * count);
    end else begin
      for (int r = 0; r < 2 * count; r++) begin
        int w, ph, exp_pos;
        w = (first + r / 2) % (L / (2 * TAPS));
        ph = r % 2;
        exp_pos = 2 * w * TAPS + ph;
        checks += 3;
        if (run_pos[r] != exp_pos) begin failures++; $display("run %0d began at %0d, expected %0d", r, run_pos[r], exp_pos); end
        if (run_base[r] != exp_pos) begin failures++; $display("run %0d pass_base %0d", r, run_base[r]); end
        if (run_len[r] != sg * TAPS + TAPS + 1) begin failures++; $display("run %0d fed %0d samples", r, run_len[r]); end
      end
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    acquire(0, 8, 4);
    acquire(6, 3, 1);   // wraps past the last window
    acquire(2, 1, 2);
    acquire(0, 8, 3);
    // An acquisition of zero windows finishes at once.
    @(negedge clk); win_count = '0; start = 1;
    @(negedge clk); start = 0;
    checks++;
    if (!done || busy) begin failures++; $display("empty acquisition"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
