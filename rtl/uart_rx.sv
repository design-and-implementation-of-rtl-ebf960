// uart_rx: RS-232 receiver (logic level). Frames are 8 data bits, LSB first, one start
// bit, no parity and one stop bit, at clk / CLKS_PER_BIT baud (default 434: 115200 baud
// from 50 MHz). rxd passes through a two-flop synchroniser; a falling edge starts a
// frame, the start bit is re-checked at its middle and every following bit is sampled
// at its middle. When the stop bit is high, data_valid pulses for one cycle with the
// byte in data; a frame with a low stop bit is dropped. Framing and baud rate are this
// design's choices. rst is synchronous, active high.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic       data_valid,
  output logic [7:0] data
);
  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;
  state_t state;
  logic [1:0]  sync;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] timer;
  logic [2:0]  bitn;
  logic [7:0]  shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync       <= 2'b11;
      state      <= IDLE;
      timer      <= '0;
      bitn       <= '0;
      shreg      <= '0;
      data       <= '0;
      data_valid <= 1'b0;
    end else begin
      sync       <= {sync[0], rxd};
      data_valid <= 1'b0;
      case (state)
        IDLE: if (!sync[1]) begin
          state <= START;
          timer <= '0;
        end
        START: if (timer == ($bits(timer))'(CLKS_PER_BIT / 2 - 1)) begin
          timer <= '0;
          bitn  <= '0;
          state <= sync[1] ? IDLE : DATA;
        end else timer <= timer + 1'b1;
        DATA: if (timer == ($bits(timer))'(CLKS_PER_BIT - 1)) begin
          timer <= '0;
          shreg <= {sync[1], shreg[7:1]};
          bitn  <= bitn + 3'd1;
          if (bitn == 3'd7) state <= STOP;
        end else timer <= timer + 1'b1;
        STOP: if (timer == ($bits(timer))'(CLKS_PER_BIT - 1)) begin
          timer <= '0;
          state <= IDLE;
          if (sync[1]) begin
            data       <= shreg;
            data_valid <= 1'b1;
          end
        end else timer <= timer + 1'b1;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
