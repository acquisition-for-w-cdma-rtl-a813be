// acq_pkg: types and constants shared by the code-acquisition blocks.
//
// The DSP drives the acquisition engine through a small synchronous memory bus
// (produced from the DSP's asynchronous external memory interface by the glue
// logic). The upper half of the bus address space holds the command
// ("primitive") and parameter registers; the lower half is a window onto
// whichever internal memory the current primitive selects. The primitive set,
// the register map and the bus widths are this design's own choices; the source
// design only states that the DSP sends primitives and parameters and that a
// decoder/arbiter picks the internal memory from the primitive.
package acq_pkg;

  localparam int BUS_AW = 12;   // bus word-address width
  localparam int BUS_DW = 32;   // bus data width (DSP data bus width)

  // Primitives the DSP writes into the primitive register.
  typedef enum logic [1:0] {
    PRIM_IDLE         = 2'd0,   // no memory on the bus
    PRIM_LOAD_CODE    = 2'd1,   // memory window = PN code memory (read/write)
    PRIM_START_ACQ    = 2'd2,   // writing it starts an acquisition run
    PRIM_READ_PROFILE = 2'd3    // memory window = delay profile memory (read)
  } prim_e;

  // Register offsets inside the register half (address MSB = 1).
  localparam logic [3:0] REG_PRIM      = 4'd0;
  localparam logic [3:0] REG_WIN_FIRST = 4'd1;
  localparam logic [3:0] REG_WIN_COUNT = 4'd2;
  localparam logic [3:0] REG_SEGS      = 4'd3;
  localparam logic [3:0] REG_STATUS    = 4'd4;  // {conflict, done, busy}
  localparam logic [3:0] REG_FINGER0   = 4'd8;  // first finger delay register
  localparam int         MAX_FINGERS   = 8;     // offsets 8..15

  // One synchronous bus request, valid for one clock.
  typedef struct packed {
    logic              we;
    logic              re;
    logic [BUS_AW-1:0] addr;
    logic [BUS_DW-1:0] wdata;
  } bus_req_t;

endpackage
