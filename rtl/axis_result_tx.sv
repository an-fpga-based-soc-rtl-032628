// axis_result_tx: AXI4-Stream master (64 bits) that returns the estimate.
//
// Each beat carries two 32-bit outputs. For NUM_DIMS searched parameters it
// sends ceil(NUM_DIMS/2) beats {x_best[2b+1], x_best[2b]} (low word first
// dimension) and a final beat {best_iter, best_fit} with TLAST. `start`
// captures the values; beats follow from the next clock, one per clock while
// TREADY is high. `done` pulses in the clock after the last beat is accepted.
// TDATA and TLAST stay stable while TVALID waits for TREADY (asserted below).
// The 64-bit width follows the document; the beat contents are this design's
// choice.
module axis_result_tx #(
  parameter int NUM_DIMS = 4,
  localparam int NBEATS  = (NUM_DIMS + 1) / 2 + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  aco_pkg::theta_t   best_theta,
  input  logic [31:0]       best_fit,
  input  logic [31:0]       best_iter,
  output logic [63:0]       m_axis_tdata,
  output logic              m_axis_tvalid,
  input  logic              m_axis_tready,
  output logic              m_axis_tlast,
  output logic              done
);
  logic [63:0] beats [NBEATS];
  logic [$clog2(NBEATS+1)-1:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_axis_tvalid <= 1'b0;
      idx           <= '0;
      done          <= 1'b0;
      beats         <= '{default: '0};
    end else begin
      done <= 1'b0;
      if (start && !m_axis_tvalid) begin
        for (int b = 0; b < NBEATS - 1; b++) begin
          beats[b][31:0]  <= best_theta[2*b];
          beats[b][63:32] <= (2*b + 1 < NUM_DIMS) ? best_theta[2*b+1] : 32'd0;
        end
        beats[NBEATS-1] <= {best_iter, best_fit};
        idx             <= '0;
        m_axis_tvalid   <= 1'b1;
      end else if (m_axis_tvalid && m_axis_tready) begin
        if (32'(idx) == NBEATS - 1) begin
          m_axis_tvalid <= 1'b0;
          done          <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  assign m_axis_tdata = beats[idx];
  assign m_axis_tlast = (32'(idx) == NBEATS - 1);

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata) && $stable(m_axis_tlast));
endmodule
