// emif_glue: glue logic from the DSP's asynchronous external memory interface
// (EMIF) to the synchronous internal memory bus of the FPGA.
//
// The chip enable and the read and write strobes (active low) come from another
// clock domain, so each passes through a two-flop synchronizer. A synchronized
// write strobe going active issues one bus write; a synchronized read strobe
// going active issues one bus read, and the read data, which the bus returns one
// clock later, is held on ed_out until the next read. Address and write data
// are sampled when the synchronized strobe goes active; by then they have been
// stable for at least two clocks, which the DSP's strobe timing guarantees.
// ed_oe (the enable of the external data drivers) follows the raw pins so that
// the FPGA releases the data bus as soon as the read strobe ends.
// Timing requirement on the DSP side: ed_out holds the read data from the sixth
// FPGA clock edge after the read strobe goes active (two to synchronize, one to
// issue the request, one for the memory, one to register the data, one for the
// synchronizer phase), so a read strobe must last at least seven clocks; a write
// strobe must last at least four and the address and data must stay stable
// during it. That the glue converts the
// asynchronous interface to a synchronous one is from the source design; the
// circuit is this design's own.
module emif_glue
  import acq_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // EMIF side (asynchronous)
  input  logic              ce_n,
  input  logic              are_n,
  input  logic              awe_n,
  input  logic [BUS_AW-1:0] ea,
  input  logic [BUS_DW-1:0] ed_in,
  output logic [BUS_DW-1:0] ed_out,
  output logic              ed_oe,
  // synchronous bus side
  output bus_req_t          bus_req,
  input  logic [BUS_DW-1:0] bus_rdata
);
  logic [1:0] ce_s, re_s, we_s;
  logic       rd_act, wr_act, rd_act_q, wr_act_q, rd_pend_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ce_s <= 2'b11;
      re_s <= 2'b11;
      we_s <= 2'b11;
    end else begin
      ce_s <= {ce_s[0], ce_n};
      re_s <= {re_s[0], are_n};
      we_s <= {we_s[0], awe_n};
    end
  end

  assign rd_act = !ce_s[1] && !re_s[1];
  assign wr_act = !ce_s[1] && !we_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_act_q  <= 1'b0;
      wr_act_q  <= 1'b0;
      rd_pend_q <= 1'b0;
      bus_req   <= '0;
      ed_out    <= '0;
    end else begin
      rd_act_q  <= rd_act;
      wr_act_q  <= wr_act;
      bus_req.we    <= wr_act && !wr_act_q;
      bus_req.re    <= rd_act && !rd_act_q;
      bus_req.addr  <= ea;
      bus_req.wdata <= ed_in;
      rd_pend_q <= bus_req.re;
      if (rd_pend_q) ed_out <= bus_rdata;
    end
  end

  assign ed_oe = !ce_n && !are_n;

endmodule
