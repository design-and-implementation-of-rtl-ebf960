// data_randomizer: data randomization, the third step of the encryption scheme, and
// its inverse. A 12-stage pseudo-random bit sequence (PRBS) generator is loaded with
// the 12-byte vector key3, one byte per stage (stage 0 from bits 95:88). Every clock
// cycle the generator shifts by one stage; stage 11 is the output byte and the new
// stage 0 is stage11 ^ stage10 ^ stage7 ^ stage5, which makes each of the eight bit
// lanes a maximal-length LFSR with polynomial x^12 + x^6 + x^4 + x + 1. The sixteen
// output bytes are XORed into the block, byte 0 (bits 127:120) first. Since XOR is its
// own inverse, the same unit with the same key3 removes the randomization.
//
// The 12 stages seeded by the 12-byte key3 follow the scheme; the feedback taps, the
// byte-wide stages and restarting from key3 for every block are this design's choices.
// The feedback taps are those of a 12-stage register; STAGES documents the length and
// is not meant to be changed on its own.
// Timing: a block is accepted when in_valid is high and busy is low; out_valid pulses
// 17 cycles later with data_out, which is held until the next block finishes. rst is
// synchronous, active high.
module data_randomizer
  import aes_pkg::*;
#(
  parameter int unsigned STAGES     = 12,
  parameter int unsigned SEED_BYTES = 12
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  input  block_t                    data_in,
  input  logic [8*SEED_BYTES-1:0]   key3,
  output logic                      busy,
  output logic                      out_valid,
  output block_t                    data_out
);
  logic [STAGES-1:0][7:0] stage;
  block_t                 work;
  logic [3:0]             cnt;
  block_t                 work_next;

  // XOR the current output byte into byte cnt of the block
  always_comb begin
    work_next = work;
    work_next[127 - 8*cnt -: 8] = work[127 - 8*cnt -: 8] ^ stage[STAGES-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
      cnt       <= '0;
      stage     <= '0;
      work      <= '0;
      data_out  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          for (int i = 0; i < STAGES; i++)
            stage[i] <= key3[8*SEED_BYTES - 1 - 8*(i % SEED_BYTES) -: 8];
          work <= data_in;
          cnt  <= '0;
          busy <= 1'b1;
        end
      end else begin
        for (int i = 1; i < STAGES; i++) stage[i] <= stage[i-1];
        stage[0] <= stage[11] ^ stage[10] ^ stage[7] ^ stage[5];
        work <= work_next;
        cnt  <= cnt + 4'd1;
        if (cnt == 4'(NB_BYTES - 1)) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
          data_out  <= work_next;
        end
      end
    end
  end
endmodule
