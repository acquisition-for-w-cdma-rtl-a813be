// tb_delay_profile_unit: self-checking test of the energy and address
// computation. Random correlations (including the extreme values) go in; the
// write one clock later must carry I*I+Q*Q, saturated to OUTW bits, at
// pass_base + 2*corr_idx modulo the profile length. A narrow OUTW exercises the
// saturation.
module tb_delay_profile_unit;
  localparam int ACCW = 15, IDXW = 7, PAW = 11;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, corr_valid = 0;
  logic signed [ACCW-1:0] corr_i = '0, corr_q = '0;
  logic [IDXW-1:0] corr_idx = '0;
  logic [PAW-1:0] pass_base = '0;
  logic prof_we, prof_we_n;
  logic [PAW-1:0] prof_addr, prof_addr_n;
  logic [31:0] prof_data;
  logic [23:0] prof_data_n;

  delay_profile_unit #(.ACCW(ACCW), .IDXW(IDXW), .PAW(PAW), .OUTW(32)) dut (.*);
  delay_profile_unit #(.ACCW(ACCW), .IDXW(IDXW), .PAW(PAW), .OUTW(24)) dut_narrow (
    .clk, .rst_n, .corr_valid, .corr_i, .corr_q, .corr_idx, .pass_base,
    .prof_we(prof_we_n), .prof_addr(prof_addr_n), .prof_data(prof_data_n));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e, en;
    int ea;
    bit v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      v = ($urandom_range(0, 3) != 0);
      corr_valid = v;
      case (it)
        0: begin corr_i = -(2**(ACCW-1)); corr_q = -(2**(ACCW-1)); end
        1: begin corr_i = 2**(ACCW-1) - 1; corr_q = 0; end
        default: begin corr_i = ACCW'($urandom); corr_q = ACCW'($urandom); end
      endcase
      corr_idx = IDXW'($urandom);
      pass_base = PAW'($urandom);
      e = longint'(corr_i) * corr_i + longint'(corr_q) * corr_q;
      en = (e > 64'hFF_FFFF) ? 64'hFF_FFFF : e;
      ea = (int'(pass_base) + 2 * int'(corr_idx)) % (1 << PAW);
      @(negedge clk);
      corr_valid = 0;
      checks++;
      if (prof_we != v || prof_we_n != v) begin failures++; $display("write enable wrong"); end
      if (v) begin
        checks += 3;
        if (prof_data != 32'(e)) begin failures++; $display("energy %0d expected %0d", prof_data, e); end
        if (prof_data_n != 24'(en)) begin failures++; $display("narrow energy %0d expected %0d", prof_data_n, en); end
        if (prof_addr != PAW'(ea) || prof_addr_n != PAW'(ea)) begin failures++; $display("address %0d expected %0d", prof_addr, ea); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
