// cr_info_memory -- information buffer of the CR-LDPC encoder (the "Memory"
// of the encoder block diagram).
//
// The information bits of one block are written serially while the shift
// registers compute the parity, and read back serially in the same order once
// the parity has been sent, so that the information follows the parity in
// the code. It is a K-entry, one-bit-wide memory with a write pointer and a
// read pointer; 'clr' rewinds both pointers for the next block.
//
// Timing: a write is stored at the clock edge; rd_data is combinational from
// the read pointer, so the bit at the pointer is available in the cycle 're'
// is asserted and the pointer advances at the edge. Writing more than K bits
// or reading past the last written bit in one block is not allowed (checked
// by assertions).
//
// The document only names this memory and says it separates the information
// from the parity; its organisation is this design's own.
module cr_info_memory #(
  parameter int unsigned K = cr_ldpc_pkg::K_DEF   // bits per block
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,      // rewind both pointers
  input  logic we,       // store wr_data at the write pointer
  input  logic wr_data,
  input  logic re,       // advance the read pointer
  output logic rd_data   // bit at the read pointer
);

  localparam int unsigned AW = (K > 1) ? $clog2(K + 1) : 1;

  logic          mem [K];
  logic [AW-1:0] wr_ptr, rd_ptr;

  always_ff @(posedge clk) begin
    if (we) mem[wr_ptr[$clog2(K)-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else if (clr) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (we) wr_ptr <= wr_ptr + 1'b1;
      if (re) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  assign rd_data = mem[rd_ptr[$clog2(K)-1:0]];

  // A block never holds more than K bits, and nothing is read before it is written.
  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
                                   (we && !clr) |-> (wr_ptr < AW'(K)));
  a_no_underrun : assert property (@(posedge clk) disable iff (!rst_n)
                                   (re && !clr) |-> (rd_ptr < wr_ptr));

endmodule
