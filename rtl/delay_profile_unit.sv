// delay_profile_unit: turns matched-filter outputs into the delay profile.
//
// For every correlation the I and Q matched filters deliver together, it forms
// the energy I*I + Q*Q (saturated to OUTW bits) and writes it to the delay
// profile memory at the sample position it belongs to,
//     addr = pass_base + 2*corr_idx  (mod 2^PAW),
// because consecutive filter outputs are one chip, i.e. two sample positions,
// apart. One pipeline register: the write appears one clock after corr_valid.
// The source design names this unit and places it between the matched filter
// and the DSP's peak search; the energy measure and the addressing are this
// design's choices.
module delay_profile_unit #(
  parameter int ACCW = 15,
  parameter int IDXW = 7,
  parameter int PAW  = 11,
  parameter int OUTW = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   corr_valid,
  input  logic signed [ACCW-1:0] corr_i,
  input  logic signed [ACCW-1:0] corr_q,
  input  logic [IDXW-1:0]        corr_idx,
  input  logic [PAW-1:0]         pass_base,
  output logic                   prof_we,
  output logic [PAW-1:0]         prof_addr,
  output logic [OUTW-1:0]        prof_data
);
  localparam int EW = 2 * ACCW + 1;
  logic [EW-1:0] energy;

  always_comb begin
    logic signed [2*ACCW-1:0] ii, qq;
    ii = corr_i * corr_i;
    qq = corr_q * corr_q;
    energy = EW'(unsigned'(ii)) + EW'(unsigned'(qq));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prof_we   <= 1'b0;
      prof_addr <= '0;
      prof_data <= '0;
    end else begin
      prof_we   <= corr_valid;
      prof_addr <= pass_base + PAW'({corr_idx, 1'b0});
      if (EW > OUTW && (energy >> OUTW) != '0) prof_data <= '1;
      else                                     prof_data <= OUTW'(energy);
    end
  end
endmodule
