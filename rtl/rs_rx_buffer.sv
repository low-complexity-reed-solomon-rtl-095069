// rs_rx_buffer: received-codeword buffer of the decoder.
//
// Every symbol that enters the decoder is written here; the symbols leave in
// the same order when the Chien/Forney block presents the error value for
// their position, and the corrected symbol is rd_data XOR err_val. With the
// three-stage pipeline (syndromes, key equation, Chien/Forney) up to three
// codewords are in flight, so DEPTH must be at least 3 * 255; 1024 is used.
//
// The document draws two SRAM banks and a memory controller without giving
// their sizes or addressing; this design uses one circular buffer of DEPTH
// words with a write pointer and a read pointer, written as an array so a
// tool can map it to a RAM. The read is asynchronous (rd_data follows
// rd_ptr in the same cycle). count_o is the fill level; writing into a full
// buffer or reading an empty one is a protocol error checked by assertions.
module rs_rx_buffer
  import rs_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  gf_t                      wr_data,
  input  logic                     rd_en,
  output gf_t                      rd_data,
  output logic [$clog2(DEPTH):0]   count_o
);
  localparam int unsigned AW = $clog2(DEPTH);

  gf_t            mem [DEPTH];
  logic [AW-1:0]  wp, rp;
  logic [AW:0]    cnt;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      a_no_overflow: assert (!(wr_en && !rd_en && cnt == (AW+1)'(DEPTH)))
        else $error("rx buffer overflow");
      a_no_underflow: assert (!(rd_en && cnt == '0))
        else $error("rx buffer underflow");
      if (wr_en) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + AW'(1);
      if (rd_en) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + AW'(1);
      cnt <= cnt + (AW+1)'(wr_en) - (AW+1)'(rd_en);
    end
  end

  assign rd_data = mem[rp];
  assign count_o = cnt;
endmodule
