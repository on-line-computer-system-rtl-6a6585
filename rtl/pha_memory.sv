// pha_memory: the core memory of a pulse height analyzer, which builds the
// pulse height spectrum by itself and is read out by the computer later.
//
// The analogue-to-digital converter sits outside; for each gated pulse it
// presents a channel number with `event_valid` (one clock). The memory
// holds one COUNT_W-bit count per channel and adds one to the channel of
// each event: the event's channel is registered, its count read on the
// next clock and written back plus one on the clock after, so an event is
// taken every third clock at most. `busy` marks that dead time; events
// offered while busy are not counted. Counts stop at their largest value
// rather than wrap. `clear` (one clock, while idle) zeroes every channel,
// one per clock, also under `busy`. The readout port returns the count of
// `rd_addr` one clock later, at any time. The document gives 128-channel
// analyzers with core and one 4096-channel two-dimensional analyzer, whose
// two coordinates form the channel number outside this block; the count
// width, the increment cycle and the clear are this design's choices.
module pha_memory #(
  parameter int CHANNELS = 128,
  parameter int COUNT_W  = 24,
  localparam int CH_W    = $clog2(CHANNELS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               event_valid,
  input  logic [CH_W-1:0]    event_ch,
  output logic               busy,
  input  logic [CH_W-1:0]    rd_addr,
  output logic [COUNT_W-1:0] rd_data
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE, S_CLEAR} state_t;

  state_t             state;
  logic [CH_W-1:0]    ch_q;
  logic [COUNT_W-1:0] cnt_q;
  logic [COUNT_W-1:0] mem [CHANNELS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ch_q  <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (clear) begin
            ch_q  <= '0;
            state <= S_CLEAR;
          end else if (event_valid) begin
            ch_q  <= event_ch;
            state <= S_READ;
          end
        S_READ:  state <= S_WRITE;
        S_WRITE: state <= S_IDLE;
        S_CLEAR: begin
          ch_q <= ch_q + 1'b1;
          if (int'(ch_q) == CHANNELS - 1) state <= S_IDLE;
        end
      endcase
    end
  end

  // Memory array: read-modify-write for events, sweep for clear.
  always_ff @(posedge clk) begin
    if (state == S_READ) cnt_q <= mem[ch_q];
    if (state == S_WRITE) mem[ch_q] <= (&cnt_q) ? cnt_q : cnt_q + 1'b1;
    if (state == S_CLEAR) mem[ch_q] <= '0;
    rd_data <= mem[rd_addr];
  end

  assign busy = (state != S_IDLE);

endmodule
