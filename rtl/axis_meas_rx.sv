// axis_meas_rx: AXI4-Stream slave that loads the measurement record.
//
// Each 128-bit beat carries one measurement in its lower 96 bits:
// [31:0] bearing z(k) (Q3.29 rad), [63:32] own-ship x_o(k), [95:64] own-ship
// y_o(k) (Q24.8 m); bits [127:96] are ignored. `start` arms the receiver and
// clears the count; from the next clock TREADY is high and beat j is written to
// buffer word j. Beats beyond DEPTH are accepted and dropped. The beat with
// TLAST ends the record: TREADY falls and `done` pulses one clock later, with
// `count` holding the number of stored samples.
// The bus widths follow the document; the field order is this design's choice.
module axis_meas_rx #(
  parameter int DEPTH = 2048,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [127:0]  s_axis_tdata,
  input  logic          s_axis_tvalid,
  output logic          s_axis_tready,
  input  logic          s_axis_tlast,
  output logic          mem_we,
  output logic [AW-1:0] mem_waddr,
  output logic [95:0]   mem_wdata,
  output logic          done,
  output logic [AW:0]   count
);
  logic active;
  logic beat;

  assign s_axis_tready = active;
  assign beat          = active && s_axis_tvalid;
  assign mem_we        = beat && (count < (AW+1)'(DEPTH));
  assign mem_waddr     = count[AW-1:0];
  assign mem_wdata     = s_axis_tdata[95:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      count  <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !active) begin
        active <= 1'b1;
        count  <= '0;
      end else if (beat) begin
        if (count < (AW+1)'(DEPTH)) count <= count + 1'b1;
        if (s_axis_tlast) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end
endmodule
