// site_ibuf: the small next-instruction buffer attached to every SiteO.
//
// Holds up to DEPTH (8) next-instruction entries, each a next opcode and a
// next destination taken from the "next" fields of a programming message.
// When the SiteO streams a result, it labels the new message with the entry
// under the read pointer and then advances the pointer, wrapping after the
// last written entry, so one stationary SiteO can send successive results to
// successive destinations (for example to a different adder for each column
// of matrix B when one SiteM is reused for several matrix-vector products).
//
//   prog_i   : PROG message  - the buffer becomes the single entry entry_i
//   append_i : UPDATE message - entry_i is added at the end (ignored when full)
//   next_i   : a streamed result used entry_o; move to the next entry
//
// All updates happen at the clock edge; entry_o and programmed_o are
// registered state. The 8-word size follows the m-IPU description; the
// round-robin use of the entries and the PROG/UPDATE meaning are this
// design's reading of that description. Reset empties the buffer.
module site_ibuf
  import mipu_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        prog_i,
  input  logic        append_i,
  input  ibuf_entry_t entry_i,
  input  logic        next_i,
  output ibuf_entry_t entry_o,
  output logic        programmed_o,
  output logic        full_o
);

  localparam int PW = $clog2(DEPTH);

  ibuf_entry_t    mem [DEPTH];
  logic [PW:0]    count;
  logic [PW-1:0]  rd_ptr;

  assign entry_o      = mem[rd_ptr];
  assign programmed_o = (count != 0);
  assign full_o       = (count == (PW+1)'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      rd_ptr <= '0;
    end else if (prog_i) begin
      count  <= (PW+1)'(1);
      rd_ptr <= '0;
    end else begin
      if (append_i && !full_o) count <= count + 1'b1;
      if (next_i && programmed_o)
        rd_ptr <= ({1'b0, rd_ptr} + 1'b1 == count) ? '0 : rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (prog_i)                  mem[0]              <= entry_i;
    else if (append_i && !full_o) mem[count[PW-1:0]] <= entry_i;
  end

endmodule
