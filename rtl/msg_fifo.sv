// msg_fifo: message FIFO of a SiteO (one for the Left input, one for the Top input).
//
// A circular buffer of DEPTH 64-bit messages with a valid/ready push side and a
// show-ahead pop side: the oldest message is always visible on head_o while
// valid_o is high, and leaves when the reader raises pop_i. A message pushed at
// a clock edge is at the head right after that edge, so a SiteO whose FIFOs are
// empty can pass a message on in the next cycle (one-cycle turnout). When the
// FIFO is full, in_ready_o is low and the sender must hold its message: this is
// the "full" signal that stops the sender. in_ready_o depends only on the
// occupancy register, so back-pressure never forms a combinational path from
// one SiteO to the next; a full FIFO therefore takes its next message one cycle
// after it has been popped. DEPTH is this design's choice; the FIFOs'
// existence, the one-cycle turnout and the full back-pressure follow the m-IPU
// description. Reset empties the FIFO.
module msg_fifo
  import mipu_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  // push side
  input  logic in_valid_i,
  input  msg_t in_msg_i,
  output logic in_ready_o,
  // pop side
  output logic valid_o,
  output msg_t head_o,
  input  logic pop_i,
  // occupancy
  output logic [$clog2(DEPTH+1)-1:0] count_o
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  msg_t            mem [DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] count;

  logic push, pop;

  assign valid_o    = (count != 0);
  assign head_o     = mem[rd_ptr];
  assign in_ready_o = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign push       = in_valid_i && in_ready_o;
  assign pop        = pop_i && valid_o;
  assign count_o    = count;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_msg_i;
  end

  // A reader never pops an empty FIFO.
  assert property (@(posedge clk) disable iff (!rst_n) pop_i |-> valid_o)
    else $error("msg_fifo: pop while empty");

endmodule
