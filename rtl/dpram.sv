// dpram: dual-port packet memory, used for the header memory and the data
// memory of each side of the adapter.
//
// Port A is the byte-wide port of the DMA unit: one byte read or written per
// clock.  Port B is the 32-bit port of the protocol processor: one word per
// clock, with a byte enable per byte lane.  Byte k of a word is the byte at
// byte address 4*word+k (little-endian lanes).  Both ports read synchronously:
// the data of an address given in cycle t is on the output in cycle t+1.  If
// both ports write the same byte in one cycle, port A wins.  The content is
// not reset.
//
// From the architecture: separate header and data memories, shared by the DMA
// unit and the protocol processors. This design's choices: the byte/word port
// split, synchronous reads and the collision rule.
module dpram #(
  parameter int unsigned BYTES = 2048
) (
  input  logic                       clk,
  // port A: DMA, bytes
  input  logic                       a_en,
  input  logic                       a_we,
  input  logic [$clog2(BYTES)-1:0]   a_addr,
  input  logic [7:0]                 a_wdata,
  output logic [7:0]                 a_rdata,
  // port B: processor, words
  input  logic                       b_en,
  input  logic [3:0]                 b_we,
  input  logic [$clog2(BYTES)-3:0]   b_addr,
  input  logic [31:0]                b_wdata,
  output logic [31:0]                b_rdata
);
  localparam int unsigned WORDS = BYTES / 4;

  // Stored as words with byte lanes; port A selects a lane.
  logic [3:0][7:0] mem [WORDS];

  logic [$clog2(BYTES)-3:0] a_word;
  logic [1:0]               a_lane;
  assign a_word = a_addr[$clog2(BYTES)-1:2];
  assign a_lane = a_addr[1:0];

  always_ff @(posedge clk) begin
    if (b_en) begin
      for (int k = 0; k < 4; k++)
        if (b_we[k] && !(a_en && a_we && a_word == b_addr && a_lane == 2'(k)))
          mem[b_addr][k] <= b_wdata[8*k +: 8];
      b_rdata <= mem[b_addr];
    end
    if (a_en) begin
      if (a_we) mem[a_word][a_lane] <= a_wdata;
      a_rdata <= mem[a_word][a_lane];
    end
  end
endmodule
