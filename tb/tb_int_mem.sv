// tb_int_mem: self-checking test of the dual-port internal memory.
// Random reads and writes on both ports are compared with a reference array;
// read data is checked one clock after the request (read latency 1), and a
// read of a word written in the same clock on the other port returns the old
// word.
module tb_int_mem;
  localparam int DEPTH = 64, WIDTH = 16, AW = 6;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [WIDTH-1:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] ref_mem [DEPTH];

  int_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] exp_a, exp_b;
    bit chk_a, chk_b;
    // Fill through port A, then through port B.
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      ref_mem[i] = WIDTH'($urandom);
      if (i % 2 == 0) begin a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = ref_mem[i]; b_en = 0; end
      else            begin b_en = 1; b_we = 1; b_addr = AW'(i); b_wdata = ref_mem[i]; a_en = 0; end
    end
    @(negedge clk); a_en = 0; b_en = 0; a_we = 0; b_we = 0;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      a_en = 1'($urandom); a_we = ($urandom_range(0, 3) == 0); a_addr = AW'($urandom);
      a_wdata = WIDTH'($urandom);
      b_en = 1'($urandom); b_we = ($urandom_range(0, 3) == 0); b_addr = AW'($urandom);
      b_wdata = WIDTH'($urandom);
      if (a_en && b_en && a_we && b_we && a_addr == b_addr) b_we = 0;  // no write-write collision
      chk_a = a_en; chk_b = b_en;
      exp_a = ref_mem[a_addr];
      exp_b = ref_mem[b_addr];
      @(posedge clk);
      if (a_en && a_we) ref_mem[a_addr] = a_wdata;
      if (b_en && b_we) ref_mem[b_addr] = b_wdata;
      #1;
      if (chk_a) begin
        checks++;
        if (a_rdata !== exp_a) begin failures++; $display("port A read %0h expected %0h", a_rdata, exp_a); end
      end
      if (chk_b) begin
        checks++;
        if (b_rdata !== exp_b) begin failures++; $display("port B read %0h expected %0h", b_rdata, exp_b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
