// microcode_pkg: shared definitions of the coprocessor microprogram.
//
// Holds the control-store image type, the entry address of each routine,
// the fill word placed in unused locations, the overlap marker and the two
// word-assembly helpers R() (register form {number, 2'b00, R1, R2}) and
// J() (branch form {number, target}). The program itself is assembled in
// microcode_rom; the testbenches use the entry addresses and the fill word.
// The entry addresses and helpers are this design's own.
package microcode_pkg;
  import pdes_pkg::*;

  typedef logic [15:0] rom_t [CS_DEPTH];

  localparam int A_INIT     = 0;
  localparam int A_FETCH    = 64;
  localparam int A_POST_MSG = 128;
  localparam int A_GET_EVT  = 256;
  localparam int A_INIT_SIM = 448;
  localparam int A_POST_EVT = 576;
  localparam int A_ERR      = 640;
  localparam int A_NULLS    = 704;

  // Unused words jump to address 0.
  localparam logic [15:0] FILL = {UI_JMP, 10'd0};
  // Word CS_DEPTH-1 reads BAD_MARK if two routines overlap.
  localparam logic [15:0] BAD_MARK = 16'h0BAD;

  function automatic logic [15:0] R(uinstr_e op, int a = 0, int b = 0);
    return {op, 2'b00, 4'(a), 4'(b)};
  endfunction

  function automatic logic [15:0] J(uinstr_e op, int t);
    return {op, 10'(t)};
  endfunction


endpackage
