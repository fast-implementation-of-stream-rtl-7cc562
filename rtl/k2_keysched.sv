// k2_keysched - K2 key schedule: expands the 128-bit key into twelve words K0..K11.
//
//   K_i = IK_i                                                   i = 0..3
//   K_i = K_{i-4} ^ Sub(K_{i-1} rotated left by 8) ^ Rcon[i/4-1]  i = 4, 8
//   K_i = K_{i-4} ^ K_{i-1}                                       other i
// Sub is the K2 Sub step (S-box plus MixColumn), and Rcon[j] = (x^j mod the AES
// polynomial, 0, 0, 0) with the byte in the top position.
// One word is produced per clock. For i = 4 and 8 the Sub result is first captured
// in a flip-flop ('tmp') and the word is finished on the next clock: this cuts the
// key-schedule path, the longest one in a single-cycle version, at the cost of two
// extra clocks. One Sub instance is shared by the two uses.
// Interface: start (one clock) latches key, with IK0 = key[127:96] ... IK3 = key[31:0]
// (word order is this design's choice). busy is high while words are produced, done
// pulses for one clock when ek[0..11] is complete; ek holds until the next start.
// Timing: done comes 10 clocks after start.
module k2_keysched
  import k2_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  output logic         busy,
  output logic         done,
  output word_t [11:0] ek
);

  logic [3:0] idx;      // index i of the word being produced
  logic       phase;    // 1 once tmp holds the Sub result for i = 4n
  word_t      tmp;
  word_t      prev, back4, sub_in, sub_out, rcon;

  assign prev   = ek[idx - 4'd1];
  assign back4  = ek[idx - 4'd4];
  assign sub_in = {prev[23:0], prev[31:24]};
  // Rcon[0] for i = 4, Rcon[1] for i = 8
  assign rcon   = {idx[3] ? gf_pow(8'h02, 1, POLY_AES) : gf_pow(8'h02, 0, POLY_AES), 24'h0};

  k2_sub u_sub (.din(sub_in), .dout(sub_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ek    <= '0;
      idx   <= 4'd4;
      phase <= 1'b0;
      tmp   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        ek[3:0] <= {key[31:0], key[63:32], key[95:64], key[127:96]};
        idx     <= 4'd4;
        phase   <= 1'b0;
        busy    <= 1'b1;
      end else if (busy) begin
        if (idx[1:0] == 2'd0 && !phase) begin
          tmp   <= sub_out;
          phase <= 1'b1;
        end else begin
          ek[idx] <= back4 ^ ((idx[1:0] == 2'd0) ? (tmp ^ rcon) : prev);
          phase   <= 1'b0;
          idx     <= idx + 4'd1;
          if (idx == 4'd11) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

endmodule
