// uart_tx: RS-232 transmitter (logic level). Sends 8 data bits LSB first, framed by a
// low start bit and a high stop bit, at clk / CLKS_PER_BIT baud (default 434: 115200
// baud from 50 MHz). A byte is taken when start is high while ready is high; ready
// drops for the 10 bit times of the frame. txd idles high. Framing and baud rate are
// this design's choices. rst is synchronous, active high.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);
  logic [8:0] frame;   // stop, data[7:0]; shifted out LSB first after the start bit
  logic [3:0] bits_left;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] timer;

  assign ready = (bits_left == 4'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      frame     <= '1;
      bits_left <= '0;
      timer     <= '0;
      txd       <= 1'b1;
    end else if (ready) begin
      txd <= 1'b1;
      if (start) begin
        frame     <= {1'b1, data};
        bits_left <= 4'd10;
        timer     <= '0;
        txd       <= 1'b0;
      end
    end else begin
      if (timer == ($bits(timer))'(CLKS_PER_BIT - 1)) begin
        timer     <= '0;
        frame     <= {1'b1, frame[8:1]};
        bits_left <= bits_left - 4'd1;
        txd       <= (bits_left == 4'd1) ? 1'b1 : frame[0];
      end else timer <= timer + 1'b1;
    end
  end
endmodule
