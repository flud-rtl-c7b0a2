// flud_recip: sequential binary32 reciprocal, the divider of a PE group.
//
// Only one PE per PEG divides; the FLUD schedule replaces the division of the
// column below the pivot by one reciprocal followed by multiplications, so the
// divider only ever computes 1/d.  This implementation is a radix-2 restoring
// divider on the 24-bit significand: it produces 27 quotient bits, one per
// cycle, then rounds to nearest even and packs.
//
// Interface: pulse start with d; busy is high while working; valid pulses for
// one cycle with the result q.  Latency from start to valid is LATENCY = 29
// cycles.  d = 0 (or subnormal) gives +/-infinity; results below the normal
// range flush to zero.  The iterative structure is this design's choice; the
// published design only states that the divider exists.
module flud_recip
  import flud_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t d,
  output logic  busy,
  output logic  valid,
  output fp32_t q
);
  localparam int unsigned NBITS = 27;

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_PACK} state_e;
  state_e state;

  logic        sign;
  logic [7:0]  ed;
  logic [23:0] md;
  logic [25:0] rem;
  logic [NBITS-1:0] qbits;
  logic [4:0]  cnt;
  fp32_t       q_r;
  logic        valid_r;

  logic [25:0] diff;
  logic        ge;
  assign diff = rem - {2'b00, md};
  assign ge   = (rem >= {2'b00, md});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      sign    <= 1'b0;
      ed      <= '0;
      md      <= '0;
      rem     <= '0;
      qbits   <= '0;
      cnt     <= '0;
      q_r     <= '0;
      valid_r <= 1'b0;
    end else begin
      valid_r <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          sign  <= d[31];
          ed    <= d[30:23];
          md    <= {1'b1, d[22:0]};
          rem   <= 26'h080_0000;          // 1.0 on the significand's scale
          qbits <= '0;
          cnt   <= '0;
          state <= S_ITER;
        end
        S_ITER: begin
          qbits <= {qbits[NBITS-2:0], ge};
          rem   <= (ge ? diff : rem) << 1;
          cnt   <= cnt + 1'b1;
          if (cnt == 5'(NBITS - 1)) state <= S_PACK;
        end
        S_PACK: begin
          if (ed == 8'd0)
            q_r <= {sign, 8'hff, 23'd0};
          else if (qbits[NBITS-1])         // d is a power of two: exact
            q_r <= fp_pack(sign, 12'sd254 - $signed({4'd0, ed}), 24'h80_0000, 1'b0, 1'b0);
          else
            q_r <= fp_pack(sign, 12'sd253 - $signed({4'd0, ed}), qbits[25:2], qbits[1],
                           qbits[0] | (rem != 26'd0));
          valid_r <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy  = (state != S_IDLE);
  assign valid = valid_r;
  assign q     = q_r;
endmodule
