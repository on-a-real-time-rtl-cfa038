// bss_pkg: types and arithmetic shared by the BSS hardware accelerator.
//
// Number format. The matrix unit works on 32-bit two's-complement fixed point
// with 12 integer bits and 20 fraction bits (Q12.20), the word size the
// bitwidth study settled on, and saturates instead of wrapping. The FFT/IFFT
// keeps 24-bit words; this design reads them as Q4.20 so that moving a value
// from the FFT into the matrix unit is a plain sign extension.
//
// Coprocessor instruction. The processor side of each accelerator channel
// issues LOAD and STORE instructions; fcb_instr_t is this design's own
// encoding of such an instruction (the operation, a "start the unit once the
// data is in" flag, four unit-specific mode bits, a unit number and an
// element address).
package bss_pkg;

  localparam int DW    = 32;  // matrix unit word
  localparam int FW    = 20;  // fraction bits of every fixed-point word
  localparam int FFT_W = 24;  // FFT/IFFT word
  localparam int MDIM  = 4;   // matrix dimension (four microphones)
  localparam int AW    = 10;  // element address field of an instruction

  typedef logic signed [DW-1:0] fx_t;
  typedef struct packed {
    fx_t re;
    fx_t im;
  } cfx_t;

  typedef logic signed [FFT_W-1:0] fw_t;
  typedef struct packed {
    fw_t re;
    fw_t im;
  } cfw_t;

  typedef enum logic [1:0] {
    FCB_NOP   = 2'd0,
    FCB_LOAD  = 2'd1,
    FCB_STORE = 2'd2
  } fcb_op_e;

  typedef struct packed {
    fcb_op_e        op;
    logic           go;    // LOAD: start the unit after the data is written
    logic [3:0]     mode;  // unit-specific options, passed on with the start
    logic [2:0]     unit;  // which unit of the channel
    logic [AW-1:0]  addr;  // first element address (LOAD) or element (STORE)
  } fcb_instr_t;

  // States of the interface decoder (load/store state machine).
  typedef enum logic [1:0] {
    FCB_IDLE  = 2'd0,
    FCB_LD    = 2'd1,
    FCB_ST    = 2'd2,
    FCB_WAIT  = 2'd3
  } fcb_state_e;

  // Element address that a STORE reads the channel status from.
  localparam logic [AW-1:0] STATUS_ADDR = '1;

  // Saturate a wide signed value to a 32-bit word.
  function automatic fx_t sat_fx(input logic signed [71:0] v);
    if (v > 72'sd2147483647)       return 32'sh7fff_ffff;
    else if (v < -72'sd2147483648) return 32'sh8000_0000;
    else                           return v[31:0];
  endfunction

  // Saturate a wide signed value to a 24-bit FFT word.
  function automatic fw_t sat_fw(input logic signed [63:0] v);
    if (v > 64'sd8388607)       return 24'sh7f_ffff;
    else if (v < -64'sd8388608) return 24'sh80_0000;
    else                        return v[23:0];
  endfunction

endpackage
