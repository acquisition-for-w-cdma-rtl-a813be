// decoder_arbiter: address decoder and arbiter of the internal bus.
//
// The DSP is the master and the acquisition engine the slave. The DSP writes a
// primitive (command) and its parameters into registers in the upper half of
// the bus address space (address MSB = 1). The lower half is a window onto one
// internal memory, and which memory that is follows from the current
// primitive: PRIM_LOAD_CODE opens the PN code memory (read and write),
// PRIM_READ_PROFILE opens the delay profile memory (read only), and the other
// primitives open none. This keeps two memories from driving the bus at once.
// The arbiter part keeps the DSP off the memories while the acquisition engine
// uses them: a window access during a run is dropped and sets the sticky
// "conflict" status bit (cleared by writing the status register).
// Writing PRIM_START_ACQ while the engine is idle issues a one-clock start.
// Register map (word offsets in the register half, see acq_pkg):
//   0 primitive, 1 first window, 2 window count, 3 code segments,
//   4 status {conflict, done, busy} (read only apart from clearing conflict),
//   8.. finger delay registers (NFING of them): the delays the DSP's peak
//   search found, in half-chip profile positions, handed on to the tracking
//   unit through finger_delay; finger_load pulses for one clock after a write.
// Timing: requests are one clock long; read data is valid on bus_rdata in the
// clock after the request. That the primitive decides which memory is on the
// bus is the source design's; the encoding and register map are this design's.
module decoder_arbiter
  import acq_pkg::*;
#(
  parameter int CODE_AW = 8,    // address width of the PN code memory
  parameter int PROF_AW = 11,   // address width of the delay profile memory
  parameter int WINW    = 4,    // width of window numbers
  parameter int SEGW    = 2,    // width of the segment count
  parameter int NFING   = 4     // finger delay registers (at most MAX_FINGERS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bus_req_t           bus_req,
  output logic [BUS_DW-1:0]  bus_rdata,
  // PN code memory, bus port
  output logic               code_en,
  output logic               code_we,
  output logic [CODE_AW-1:0] code_addr,
  output logic               code_wdata,
  input  logic               code_rdata,
  // delay profile memory, bus port (read only)
  output logic               prof_en,
  output logic [PROF_AW-1:0] prof_addr,
  input  logic [BUS_DW-1:0]  prof_rdata,
  // acquisition controller
  output logic               acq_start,
  output logic [WINW-1:0]    win_first,
  output logic [WINW:0]      win_count,
  output logic [SEGW-1:0]    segs,
  input  logic               acq_busy,
  input  logic               acq_done,
  output prim_e              prim,
  // delays for the tracking unit
  output logic [PROF_AW-1:0] finger_delay [NFING],
  output logic               finger_load
);
  typedef enum logic [1:0] {SRC_NONE, SRC_REG, SRC_CODE, SRC_PROF} rsrc_e;

  logic        is_reg, win_ok, is_fing;
  logic [3:0]  reg_off, fidx;
  logic        conflict_q;
  rsrc_e       rsrc_q;
  logic [BUS_DW-1:0] reg_rdata_q;

  assign is_reg  = bus_req.addr[BUS_AW-1];
  assign reg_off = bus_req.addr[3:0];
  assign win_ok  = !is_reg && !acq_busy;
  assign fidx    = reg_off - REG_FINGER0;
  assign is_fing = (reg_off >= REG_FINGER0) && (32'(fidx) < 32'(NFING));

  // Memory selection by primitive.
  assign code_en    = win_ok && (prim == PRIM_LOAD_CODE) && (bus_req.we || bus_req.re);
  assign code_we    = bus_req.we;
  assign code_addr  = bus_req.addr[CODE_AW-1:0];
  assign code_wdata = bus_req.wdata[0];
  assign prof_en    = win_ok && (prim == PRIM_READ_PROFILE) && bus_req.re;
  assign prof_addr  = bus_req.addr[PROF_AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prim        <= PRIM_IDLE;
      win_first   <= '0;
      win_count   <= '0;
      segs        <= SEGW'(1);
      acq_start   <= 1'b0;
      conflict_q  <= 1'b0;
      rsrc_q      <= SRC_NONE;
      reg_rdata_q <= '0;
      finger_load <= 1'b0;
      for (int f = 0; f < NFING; f++) finger_delay[f] <= '0;
    end else begin
      acq_start   <= 1'b0;
      finger_load <= 1'b0;
      rsrc_q    <= SRC_NONE;
      if (bus_req.we && is_reg) begin
        unique case (reg_off)
          REG_PRIM: begin
            prim <= prim_e'(bus_req.wdata[1:0]);
            if (prim_e'(bus_req.wdata[1:0]) == PRIM_START_ACQ && !acq_busy)
              acq_start <= 1'b1;
          end
          REG_WIN_FIRST: win_first <= bus_req.wdata[WINW-1:0];
          REG_WIN_COUNT: win_count <= bus_req.wdata[WINW:0];
          REG_SEGS:      segs      <= bus_req.wdata[SEGW-1:0];
          REG_STATUS:    conflict_q <= 1'b0;
          default: begin
            for (int f = 0; f < NFING; f++)
              if (is_fing && fidx == 4'(f)) finger_delay[f] <= bus_req.wdata[PROF_AW-1:0];
            if (is_fing) finger_load <= 1'b1;
          end
        endcase
      end
      if (bus_req.re && is_reg) begin
        rsrc_q <= SRC_REG;
        unique case (reg_off)
          REG_PRIM:      reg_rdata_q <= BUS_DW'(prim);
          REG_WIN_FIRST: reg_rdata_q <= BUS_DW'(win_first);
          REG_WIN_COUNT: reg_rdata_q <= BUS_DW'(win_count);
          REG_SEGS:      reg_rdata_q <= BUS_DW'(segs);
          REG_STATUS:    reg_rdata_q <= BUS_DW'({conflict_q, acq_done, acq_busy});
          default: begin
            reg_rdata_q <= '0;
            for (int f = 0; f < NFING; f++)
              if (is_fing && fidx == 4'(f)) reg_rdata_q <= BUS_DW'(finger_delay[f]);
          end
        endcase
      end
      if (code_en && bus_req.re) rsrc_q <= SRC_CODE;
      if (prof_en)               rsrc_q <= SRC_PROF;
      // Arbitration: window access while the engine owns the memories.
      if (!is_reg && acq_busy && (bus_req.we || bus_req.re)) conflict_q <= 1'b1;
    end
  end

  always_comb begin
    unique case (rsrc_q)
      SRC_REG:  bus_rdata = reg_rdata_q;
      SRC_CODE: bus_rdata = BUS_DW'(code_rdata);
      SRC_PROF: bus_rdata = prof_rdata;
      default:  bus_rdata = '0;
    endcase
  end

  initial assert (NFING >= 1 && NFING <= MAX_FINGERS);

  // A bus request is either a read or a write.
  assert property (@(posedge clk) disable iff (!rst_n) !(bus_req.we && bus_req.re));

endmodule
