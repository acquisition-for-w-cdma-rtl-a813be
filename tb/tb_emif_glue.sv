// tb_emif_glue: self-checking test of the EMIF-to-synchronous-bus glue.
// A DSP model issues asynchronous writes and reads with strobes placed at
// random offsets from the FPGA clock. Every access must produce exactly one
// bus request with the right address and data; a small memory model answers
// reads one clock later, and the data seen on ed_out near the end of the
// read strobe must be the word stored. ed_oe must follow the read strobe.
module tb_emif_glue;
  import acq_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ce_n = 1, are_n = 1, awe_n = 1;
  logic [BUS_AW-1:0] ea = '0;
  logic [BUS_DW-1:0] ed_in = '0, ed_out, bus_rdata = '0;
  logic ed_oe;
  bus_req_t bus_req;
  int checks = 0, failures = 0;
  int n_we = 0, n_re = 0;
  logic [BUS_DW-1:0] mem [16];

  emif_glue dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Bus slave model: 16 words, read data one clock after the request.
  always @(posedge clk) begin
    if (bus_req.we) begin
      n_we++;
      mem[bus_req.addr[3:0]] <= bus_req.wdata;
    end
    if (bus_req.re) begin
      n_re++;
      bus_rdata <= mem[bus_req.addr[3:0]];
    end else begin
      bus_rdata <= $urandom;   // the glue must only use the data after a read
    end
  end

  task automatic wr(input logic [BUS_AW-1:0] a, input logic [BUS_DW-1:0] d);
    int w0;
    repeat ($urandom_range(1, 9)) #1;
    ea = a; ed_in = d; ce_n = 0;
    repeat ($urandom_range(1, 9)) #1;
    awe_n = 0;
    w0 = n_we;
    #40 awe_n = 1;
    repeat ($urandom_range(1, 9)) #1;
    ce_n = 1;
    ed_in = $urandom;
    #30;
    checks++;
    if (n_we != w0 + 1) begin failures++; $display("write made %0d requests", n_we - w0); end
  endtask

  task automatic rd(input logic [BUS_AW-1:0] a, output logic [BUS_DW-1:0] d);
    int r0;
    repeat ($urandom_range(1, 9)) #1;
    ea = a; ce_n = 0;
    repeat ($urandom_range(1, 9)) #1;
    are_n = 0;
    r0 = n_re;
    #1;
    checks++;
    if (!ed_oe) begin failures++; $display("ed_oe low in read strobe"); end
    #69;
    d = ed_out;
    are_n = 1;
    #1;
    checks++;
    if (ed_oe) begin failures++; $display("ed_oe high after read strobe"); end
    repeat ($urandom_range(1, 9)) #1;
    ce_n = 1;
    #30;
    checks++;
    if (n_re != r0 + 1) begin failures++; $display("read made %0d requests", n_re - r0); end
  endtask

  initial begin
    logic [BUS_DW-1:0] model [16];
    logic [BUS_DW-1:0] d;
    logic [3:0] a;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      model[i] = $urandom;
      wr(BUS_AW'(i), model[i]);
    end
    for (int it = 0; it < 200; it++) begin
      a = 4'($urandom);
      if ($urandom_range(0, 1) == 1) begin
        model[a] = $urandom;
        wr(BUS_AW'(a), model[a]);
      end else begin
        rd(BUS_AW'(a), d);
        checks++;
        if (d != model[a]) begin failures++; $display("read %0d gave %0h expected %0h", a, d, model[a]); end
      end
    end
    // Strobes without chip enable must do nothing.
    begin
      int w0, r0;
      w0 = n_we; r0 = n_re;
      awe_n = 0; #50 awe_n = 1; #20 are_n = 0; #50 are_n = 1; #30;
      checks++;
      if (n_we != w0 || n_re != r0) begin failures++; $display("access without chip enable"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
