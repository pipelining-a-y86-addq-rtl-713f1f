// instr_mem: byte-addressed instruction memory with a 10-byte fetch window.
//
// The read side is combinational: for the address pc it returns the ten
// bytes pc .. pc+9 as i10bytes, byte pc in bits [7:0] (little-endian, the
// bit numbering the fetch logic's field selects assume). Bytes beyond the
// end of the memory read as zero. Ten bytes is the longest Y86-64
// instruction; the addq processor only uses the first two.
// A synchronous byte write port (ld_*) loads the program; it is this
// design's own addition, since the memory's contents are otherwise fixed.
// The size IMEM_BYTES is this design's choice.
module instr_mem #(
  parameter int unsigned IMEM_BYTES = 256
) (
  input  logic                  clk,
  input  addq_pkg::word_t       pc,
  output logic [79:0]           i10bytes,
  input  logic                  ld_en,
  input  addq_pkg::word_t       ld_addr,
  input  logic [7:0]            ld_data
);
  import addq_pkg::*;

  logic [7:0] mem [IMEM_BYTES];

  always_ff @(posedge clk) begin
    if (ld_en && ld_addr < word_t'(IMEM_BYTES))
      mem[ld_addr[$clog2(IMEM_BYTES)-1:0]] <= ld_data;
  end

  always_comb begin
    for (int k = 0; k < 10; k++) begin
      word_t a;
      a = pc + word_t'(k);
      if (a < word_t'(IMEM_BYTES))
        i10bytes[8*k +: 8] = mem[a[$clog2(IMEM_BYTES)-1:0]];
      else
        i10bytes[8*k +: 8] = 8'h00;
    end
  end

endmodule
