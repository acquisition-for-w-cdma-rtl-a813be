// int_mem: one internal memory of the acquisition engine.
//
// A simple dual-port RAM with one clock: port A belongs to the DSP side
// (the internal bus), port B to the datapath. Both ports read synchronously,
// so read data appears one clock after the address is presented with en=1.
// A read on one port of a word written in the same clock on the other port
// returns the old word. The source design shows several such internal memories
// on a shared bus behind a decoder/arbiter; their organisation (dual port,
// synchronous read, sizes) is this design's choice. In the top it holds the
// PN code (1 bit per chip) and the delay profile (one energy per word).
module int_mem #(
  parameter int DEPTH = 256,
  parameter int WIDTH = 32,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  // port A: internal bus
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B: datapath
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end
endmodule
