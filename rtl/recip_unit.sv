// recip_unit: pheromone deposit 1/(1 + f) of one ant.
//
// f is an unsigned Q16.16 fitness; the result is Q16.16 in (0, 1.0]. It is the
// quotient 2^32 / (2^16 + f), computed by a radix-2 restoring divider that
// produces one quotient bit per clock (33 bits, the top one only set for f = 0).
// `start` loads the operands; `done` pulses with `quot` valid 34 clocks later;
// `busy` is high in between and `start` is ignored while busy. The quotient is
// truncated. The divider structure is this design's choice.
module recip_unit (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] fitness,
  output logic        busy,
  output logic        done,
  output logic [31:0] quot
);
  logic [32:0] divisor;
  logic [33:0] rem;
  logic [32:0] q;
  logic [5:0]  cnt;
  logic [33:0] trial;

  assign trial = {rem[32:0], 1'b0} - {1'b0, divisor};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      divisor <= '0;
      rem     <= '0;
      q       <= '0;
      cnt     <= '0;
      quot    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          divisor <= 33'h1_0000 + 33'(fitness);
          rem     <= 34'd1;     // dividend 2^32: a single 1 shifted in 32 times
          q       <= '0;
          cnt     <= 6'd33;
        end
      end else if (cnt != 0) begin
        cnt <= cnt - 1'b1;
        if (cnt == 6'd33) begin
          // first step compares the leading 1 itself (quotient bit 32)
          if (rem >= 34'(divisor)) begin
            rem <= rem - 34'(divisor);
            q   <= 33'd1;
          end else begin
            q   <= 33'd0;
          end
        end else if (!trial[33]) begin
          rem <= trial;
          q   <= {q[31:0], 1'b1};
        end else begin
          rem <= {rem[32:0], 1'b0};
          q   <= {q[31:0], 1'b0};
        end
      end else begin
        busy <= 1'b0;
        done <= 1'b1;
        quot <= (q[32]) ? 32'hFFFF_FFFF : q[31:0];
      end
    end
  end
endmodule
