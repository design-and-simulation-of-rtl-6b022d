// data_memory: data store with a quasi-random read delay.
//
// WORDS 32-bit words addressed by a word index. A counter runs from 0 to
// PERIOD-1 and round again, continuously. A read request (en with rnw high)
// is captured at the clock edge and busy goes high; the data is looked up at
// once and held on rdata. ready pulses for one cycle, in the first following
// cycle in which the counter is 0, and busy falls after it, so a request made
// when the counter reads c is answered (PERIOD - c) cycles later, and a
// request made at 0 waits a whole PERIOD. A write (en with rnw low) updates
// the word at that clock edge and needs no handshake. Requests made while
// busy are ignored; the client waits for ready. The counter is cleared by
// rst; the array powers up holding its own word indices, matching the module
// trace of the original model. The counter, its period of 8, the size of
// 1024 words and immediate writes follow the original model; the port timing
// is this design's reading of its trace.
module data_memory
  import ss_pkg::*;
#(
  parameter int unsigned WORDS  = 1024,
  parameter int unsigned PERIOD = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic                     rnw,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  word_t                    wdata,
  output word_t                    rdata,
  output logic                     ready,
  output logic                     busy
);

  localparam int CW = $clog2(PERIOD);

  word_t         mem [WORDS];
  logic [CW-1:0] count;
  logic          pending;

  initial for (int i = 0; i < WORDS; i++) mem[i] = word_t'(i);

  assign ready = pending && (count == '0);
  assign busy  = pending;

  always_ff @(posedge clk) begin
    if (rst) begin
      count   <= '0;
      pending <= 1'b0;
      rdata   <= '0;
    end else begin
      count <= (count == CW'(PERIOD - 1)) ? '0 : count + 1'b1;
      if (ready)
        pending <= 1'b0;
      else if (en && rnw && !pending) begin
        pending <= 1'b1;
        rdata   <= mem[addr];
      end
    end
  end

  always_ff @(posedge clk)
    if (en && !rnw && !pending) mem[addr] <= wdata;

endmodule
