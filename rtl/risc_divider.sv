// risc_divider: sequential 16-bit divider for UDV, DIV and MOD.
//
// A restoring shift-subtract divider producing one quotient bit per clock.
// A start pulse with op = ALU_UDV (unsigned quotient), ALU_DIV (signed
// quotient, rounded toward zero) or ALU_MOD (unsigned remainder) loads the
// operands; busy is high for 16 cycles and done pulses for one cycle with
// the result on y, which stays valid until the next start. A zero divisor
// ends the operation in the cycle after start with done and div_zero set.
// The instruction set gives only what these operations compute; the
// iterative structure, the latency and the zero-divisor report are this
// design's choices. Signed overflow (-32768 / -1) wraps to -32768.
module risc_divider
  import risc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  alu_op_e op,
  input  word_t   a,        // dividend
  input  word_t   b,        // divisor
  output logic    busy,
  output logic    done,
  output logic    div_zero,
  output word_t   y
);

  logic [15:0] rem_q;
  word_t       quo_q, dvs_q;
  logic [4:0]  cnt_q;
  logic        neg_q, mod_q;
  logic [16:0] rem_sh, trial;

  assign rem_sh = {rem_q, quo_q[15]};
  assign trial  = rem_sh - {1'b0, dvs_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      div_zero <= 1'b0;
      y        <= '0;
      rem_q    <= '0;
      quo_q    <= '0;
      dvs_q    <= '0;
      cnt_q    <= '0;
      neg_q    <= 1'b0;
      mod_q    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        div_zero <= (b == '0);
        if (b == '0) begin
          done <= 1'b1;
          y    <= '0;
        end else begin
          busy  <= 1'b1;
          cnt_q <= 5'd16;
          rem_q <= '0;
          mod_q <= (op == ALU_MOD);
          if (op == ALU_DIV) begin
            quo_q <= a[15] ? -a : a;
            dvs_q <= b[15] ? -b : b;
            neg_q <= a[15] ^ b[15];
          end else begin
            quo_q <= a;
            dvs_q <= b;
            neg_q <= 1'b0;
          end
        end
      end else if (busy) begin
        if (!trial[16]) begin
          rem_q <= trial[15:0];
          quo_q <= {quo_q[14:0], 1'b1};
        end else begin
          rem_q <= rem_sh[15:0];
          quo_q <= {quo_q[14:0], 1'b0};
        end
        cnt_q <= cnt_q - 5'd1;
        if (cnt_q == 5'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (mod_q)
            y <= !trial[16] ? trial[15:0] : rem_sh[15:0];
          else if (neg_q)
            y <= -{quo_q[14:0], !trial[16]};
          else
            y <= {quo_q[14:0], !trial[16]};
        end
      end
    end
  end

endmodule
