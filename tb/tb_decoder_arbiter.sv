// tb_decoder_arbiter: self-checking test of the bus decoder and arbiter.
// Checks the register map (write and read back), that the primitive decides
// which memory sees a window access (code memory for LOAD_CODE, profile memory
// reads for READ_PROFILE, none otherwise), that read data comes from the
// selected source one clock later, that writing START_ACQ gives exactly one
// start pulse only when idle, and that a window access while busy is dropped
// and sets the conflict bit until the status register is written.
module tb_decoder_arbiter;
  import acq_pkg::*;
  localparam int CODE_AW = 8, PROF_AW = 11, WINW = 3, SEGW = 2;

  logic clk = 0, rst_n = 0;
  bus_req_t bus_req = '0;
  logic [BUS_DW-1:0] bus_rdata;
  logic code_en, code_we, code_wdata;
  logic code_rdata = 0;
  logic [CODE_AW-1:0] code_addr;
  logic prof_en;
  logic [PROF_AW-1:0] prof_addr;
  logic [BUS_DW-1:0] prof_rdata = '0;
  logic acq_start, acq_busy = 0, acq_done = 0;
  logic [WINW-1:0] win_first;
  logic [WINW:0] win_count;
  logic [SEGW-1:0] segs;
  prim_e prim;
  localparam int NFING = 4;
  logic [PROF_AW-1:0] finger_delay [NFING];
  logic finger_load;
  int n_finger_load = 0;
  int checks = 0, failures = 0;
  int n_start = 0, n_code_en = 0, n_prof_en = 0;

  decoder_arbiter #(.CODE_AW(CODE_AW), .PROF_AW(PROF_AW), .WINW(WINW), .SEGW(SEGW), .NFING(NFING)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Memory models: one-clock synchronous read.
  logic code_mem [256];
  logic [BUS_DW-1:0] prof_mem [2048];
  always @(posedge clk) begin
    if (acq_start) n_start++;
    if (finger_load) n_finger_load++;
    if (code_en) begin
      n_code_en++;
      if (code_we) code_mem[code_addr] <= code_wdata;
      code_rdata <= code_mem[code_addr];
    end
    if (prof_en) begin
      n_prof_en++;
      prof_rdata <= prof_mem[prof_addr];
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic bwrite(input logic [BUS_AW-1:0] a, input logic [BUS_DW-1:0] d);
    @(negedge clk);
    bus_req = '{we: 1'b1, re: 1'b0, addr: a, wdata: d};
    @(negedge clk);
    bus_req = '0;
  endtask

  task automatic bread(input logic [BUS_AW-1:0] a, output logic [BUS_DW-1:0] d);
    @(negedge clk);
    bus_req = '{we: 1'b0, re: 1'b1, addr: a, wdata: '0};
    @(negedge clk);
    bus_req = '0;
    d = bus_rdata;
  endtask

  function automatic logic [BUS_AW-1:0] ra(input logic [3:0] off);
    return {1'b1, {(BUS_AW-5){1'b0}}, off};
  endfunction

  initial begin
    logic [BUS_DW-1:0] d;
    int c0, p0, s0;
    for (int i = 0; i < 2048; i++) prof_mem[i] = $urandom;
    for (int i = 0; i < 256; i++) code_mem[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // Register map.
    bwrite(ra(REG_WIN_FIRST), 5);
    bwrite(ra(REG_WIN_COUNT), 9);
    bwrite(ra(REG_SEGS), 2);
    bread(ra(REG_WIN_FIRST), d); check(d == 5 && win_first == 5, "win_first");
    bread(ra(REG_WIN_COUNT), d); check(d == 9 && win_count == 9, "win_count");
    bread(ra(REG_SEGS), d);      check(d == 2 && segs == 2, "segs");

    // No primitive: window accesses reach no memory.
    c0 = n_code_en; p0 = n_prof_en;
    bwrite(12'h010, 1);
    bread(12'h010, d);
    check(n_code_en == c0 && n_prof_en == p0 && d == 0, "IDLE primitive opens no memory");

    // LOAD_CODE: the code memory is on the bus.
    bwrite(ra(REG_PRIM), BUS_DW'(PRIM_LOAD_CODE));
    bread(ra(REG_PRIM), d); check(d == BUS_DW'(PRIM_LOAD_CODE), "primitive read back");
    for (int i = 0; i < 40; i++) bwrite(BUS_AW'(i), BUS_DW'(i % 3 == 0));
    for (int i = 0; i < 40; i++) begin
      bread(BUS_AW'(i), d);
      check(d == BUS_DW'(i % 3 == 0), $sformatf("code word %0d = %0d", i, d));
    end
    p0 = n_prof_en;
    bread(12'h003, d);
    check(n_prof_en == p0, "profile memory closed in LOAD_CODE");

    // READ_PROFILE: the profile memory is on the bus, read only.
    bwrite(ra(REG_PRIM), BUS_DW'(PRIM_READ_PROFILE));
    c0 = n_code_en;
    for (int i = 0; i < 40; i++) begin
      int a;
      a = $urandom_range(0, 2047);
      bread(BUS_AW'(a), d);
      check(d == prof_mem[a], $sformatf("profile word %0d", a));
    end
    bwrite(12'h000, 1);
    check(n_code_en == c0, "code memory closed in READ_PROFILE");

    // START_ACQ: one start pulse when idle.
    s0 = n_start;
    bwrite(ra(REG_PRIM), BUS_DW'(PRIM_START_ACQ));
    @(negedge clk);
    check(n_start == s0 + 1, "start pulse");
    acq_busy = 1;
    bread(ra(REG_STATUS), d); check(d[0] == 1 && d[2] == 0, "status busy");
    s0 = n_start;
    bwrite(ra(REG_PRIM), BUS_DW'(PRIM_START_ACQ));
    @(negedge clk);
    check(n_start == s0, "no start while busy");

    // Arbitration: window access while busy is dropped and flagged.
    bwrite(ra(REG_PRIM), BUS_DW'(PRIM_LOAD_CODE));
    c0 = n_code_en;
    bwrite(12'h001, 1);
    bread(12'h001, d);
    check(n_code_en == c0, "code memory closed while busy");
    bread(ra(REG_STATUS), d); check(d[2] == 1, "conflict flag set");
    acq_busy = 0; acq_done = 1;
    bread(ra(REG_STATUS), d); check(d[2:0] == 3'b110, "status done with conflict");
    bwrite(ra(REG_STATUS), 0);
    bread(ra(REG_STATUS), d); check(d[2:0] == 3'b010, "conflict cleared");
    bread(12'h001, d); check(d == 0, "dropped write left the code word");

    // Finger delay registers for the tracking unit.
    begin
      int fd [NFING];
      int l0;
      for (int f = 0; f < NFING; f++) begin
        fd[f] = $urandom_range(0, 2047);
        l0 = n_finger_load;
        bwrite(ra(REG_FINGER0 + 4'(f)), BUS_DW'(fd[f]));
        @(negedge clk);
        check(n_finger_load == l0 + 1, "finger_load pulse");
      end
      for (int f = 0; f < NFING; f++) begin
        bread(ra(REG_FINGER0 + 4'(f)), d);
        check(d == BUS_DW'(fd[f]) && finger_delay[f] == PROF_AW'(fd[f]), $sformatf("finger %0d", f));
      end
      l0 = n_finger_load;
      bwrite(ra(REG_FINGER0 + 4'(NFING)), 5);   // beyond the last finger
      bread(ra(REG_FINGER0 + 4'(NFING)), d);
      check(d == 0 && n_finger_load == l0, "no register beyond the fingers");
    end

    // Finger delay registers for the tracking unit.
    begin
      int fd [NFING];
      int l0;
      for (int f = 0; f < NFING; f++) begin
        fd[f] = $urandom_range(0, 2047);
        l0 = n_finger_load;
        bwrite(ra(REG_FINGER0 + 4'(f)), BUS_DW'(fd[f]));
        @(negedge clk);
        check(n_finger_load == l0 + 1, "finger_load pulse");
      end
      for (int f = 0; f < NFING; f++) begin
        bread(ra(REG_FINGER0 + 4'(f)), d);
        check(d == BUS_DW'(fd[f]) && finger_delay[f] == PROF_AW'(fd[f]), $sformatf("finger %0d", f));
      end
      l0 = n_finger_load;
      bwrite(ra(REG_FINGER0 + 4'(NFING)), 5);   // beyond the last finger
      bread(ra(REG_FINGER0 + 4'(NFING)), d);
      check(d == 0 && n_finger_load == l0, "no register beyond the fingers");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
