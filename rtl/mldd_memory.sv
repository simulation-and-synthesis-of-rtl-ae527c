// Codeword memory of the MLDD memory system.
//
// DEPTH words of WIDTH bits (16 x 15 by default, 4-bit address). Both ports
// act on the rising clock edge: when write is high data_in is stored at addr;
// when read is high the word at addr appears on data_out after the edge and is
// held there until the next read. A read and a write to the same address in
// one cycle return the old word. The array is not reset, as in a RAM macro.
//
// The clocked read and write and the signal names follow the published memory
// waveform; the write-before-read ordering is this design's choice.
module mldd_memory #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 15,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             write,
  input  logic             read,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
);

  logic [WIDTH-1:0] tmp_ram [DEPTH];

  always_ff @(posedge clk) begin
    if (write) tmp_ram[addr] <= data_in;
    if (read)  data_out      <= tmp_ram[addr];
  end

endmodule
