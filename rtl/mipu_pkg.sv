// mipu_pkg: shared types and constants of the m-IPU.
//
// Every transfer inside the m-IPU is one 64-bit message. Its field layout
// follows the m-IPU message format (LSB first): present opcode [3:0],
// present destination [15:4], 32-bit value [47:16], next opcode [51:48]
// and next destination [63:52]. The numeric opcode encoding and the split of
// the 12-bit destination into Tile/SiteM/SiteO coordinates are this design's
// own choices: the destination is read as
//   [11:10] Tile row   [9:8] Tile column   (Tiles of a Block, 4x4)
//   [7:6]   SiteM row  [5:4] SiteM column  (SiteMs of a Tile, 4x4)
//   [3:2]   SiteO row  [1:0] SiteO column  (SiteOs of a SiteM, 4x4)
// so that the 4096 SiteOs of one Block form a 64x64 grid whose global row is
// {dest[11:10], dest[7:6], dest[3:2]} and global column {dest[9:8], dest[5:4], dest[1:0]}.
package mipu_pkg;

  localparam int MSG_W  = 64;
  localparam int ADDR_W = 12;
  localparam int OP_W   = 4;
  localparam int VAL_W  = 32;

  typedef logic [ADDR_W-1:0] addr_t;

  // The ten instructions of the m-IPU ISA (encoding assumed).
  typedef enum logic [OP_W-1:0] {
    OP_PROG   = 4'd0,  // load the stationary value, reset the next-instruction list to one entry
    OP_UPDATE = 4'd1,  // append one next-instruction entry, value ignored
    OP_A_ADD  = 4'd2,  // R = R + v            (accumulate in place)
    OP_A_ADDS = 4'd3,  // send R + v onwards   (R unchanged)
    OP_A_SUB  = 4'd4,  // R = R - v
    OP_A_SUBS = 4'd5,  // send R - v
    OP_A_MUL  = 4'd6,  // R = R * v
    OP_A_MULS = 4'd7,  // send R * v
    OP_A_DIV  = 4'd8,  // R = R / v
    OP_A_DIVS = 4'd9   // send R / v
  } opcode_e;

  // 64-bit message; a packed struct lists its fields MSB first.
  typedef struct packed {
    addr_t           next_dest;  // [63:52]
    logic [OP_W-1:0] next_op;    // [51:48]
    logic [31:0]     value;      // [47:16]
    addr_t           dest;       // [15:4]
    logic [OP_W-1:0] op;         // [3:0]
  } msg_t;

  // FPU operation select.
  typedef enum logic [1:0] {
    FPU_ADD = 2'd0,
    FPU_SUB = 2'd1,
    FPU_MUL = 2'd2,
    FPU_DIV = 2'd3
  } fpu_op_e;

  // One entry of a SiteO's next-instruction buffer.
  typedef struct packed {
    logic [OP_W-1:0] op;
    addr_t           dest;
  } ibuf_entry_t;

  function automatic logic [5:0] global_row(addr_t a);
    return {a[11:10], a[7:6], a[3:2]};
  endfunction

  function automatic logic [5:0] global_col(addr_t a);
    return {a[9:8], a[5:4], a[1:0]};
  endfunction

  function automatic addr_t make_addr(logic [5:0] row, logic [5:0] col);
    return {row[5:4], col[5:4], row[3:2], col[3:2], row[1:0], col[1:0]};
  endfunction

  function automatic msg_t make_msg(logic [OP_W-1:0] op, addr_t dest, logic [31:0] value,
                                    logic [OP_W-1:0] next_op, addr_t next_dest);
    msg_t m;
    m.op = op; m.dest = dest; m.value = value; m.next_op = next_op; m.next_dest = next_dest;
    return m;
  endfunction

endpackage
