// data_mem: byte-addressed data memory with 64-bit little-endian accesses.
//
// A read (rd = 1) returns the eight bytes addr .. addr+7 combinationally on
// dout, byte addr in bits [7:0]; with rd = 0 dout is 0. A write (wr = 1)
// stores din into the same eight bytes on the rising clock edge. Bytes
// beyond DMEM_BYTES read as 0 and are not written. Size, byte order and
// timing are this design's choices (Y86-64 conventions); the contents are
// not reset.
module data_mem #(
  parameter int unsigned DMEM_BYTES = 256
) (
  input  logic            clk,
  input  addq_pkg::word_t addr,
  input  addq_pkg::word_t din,
  input  logic            rd,
  input  logic            wr,
  output addq_pkg::word_t dout
);
  import addq_pkg::*;

  localparam int unsigned AW = $clog2(DMEM_BYTES);

  logic [7:0] mem [DMEM_BYTES];

  always_ff @(posedge clk) begin
    if (wr) begin
      for (int k = 0; k < 8; k++) begin
        if (addr + word_t'(k) < word_t'(DMEM_BYTES))
          mem[AW'(addr + word_t'(k))] <= din[8*k +: 8];
      end
    end
  end

  always_comb begin
    dout = '0;
    if (rd) begin
      for (int k = 0; k < 8; k++) begin
        if (addr + word_t'(k) < word_t'(DMEM_BYTES))
          dout[8*k +: 8] = mem[AW'(addr + word_t'(k))];
      end
    end
  end

endmodule
