// tb_axis_result_tx: sends random results under random TREADY back-pressure
// for four and six parameters; checks beat contents and order, TLAST only on
// the last beat, data held while stalled and the done pulse.
module tb_axis_result_tx;
  import aco_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  theta_t best_theta;
  logic [31:0] best_fit = 0, best_iter = 0;
  logic [63:0] td4, td6;
  logic tv4, tv6, tl4, tl6, done4, done6;
  logic m_axis_tready = 0;
  int checks = 0, failures = 0;

  axis_result_tx #(.NUM_DIMS(4)) u4 (.clk, .rst_n, .start, .best_theta, .best_fit, .best_iter,
    .m_axis_tdata(td4), .m_axis_tvalid(tv4), .m_axis_tready, .m_axis_tlast(tl4), .done(done4));
  axis_result_tx #(.NUM_DIMS(6)) u6 (.clk, .rst_n, .start, .best_theta, .best_fit, .best_iter,
    .m_axis_tdata(td6), .m_axis_tvalid(tv6), .m_axis_tready, .m_axis_tlast(tl6), .done(done6));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] exp4 [3], exp6 [4];
  int i4, i6, nd4, nd6, stalls;

  always @(posedge clk) if (rst_n) begin
    if (tv4 && m_axis_tready) begin
      checks += 2;
      if (td4 !== exp4[i4]) begin failures++; $display("FAIL nd4 beat %0d %h exp %h", i4, td4, exp4[i4]); end
      if (tl4 !== (i4 == 2)) begin failures++; $display("FAIL nd4 tlast"); end
      i4++;
    end
    if (tv6 && m_axis_tready) begin
      checks += 2;
      if (td6 !== exp6[i6]) begin failures++; $display("FAIL nd6 beat %0d %h exp %h", i6, td6, exp6[i6]); end
      if (tl6 !== (i6 == 3)) begin failures++; $display("FAIL nd6 tlast"); end
      i6++;
    end
    if (tv4 && !m_axis_tready) stalls++;
    if (done4) nd4++;
    if (done6) nd6++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 200; r++) begin
      @(negedge clk);
      for (int d = 0; d < MAX_DIMS; d++) best_theta[d] = $urandom;
      best_fit = $urandom; best_iter = $urandom;
      exp4 = '{{best_theta[1], best_theta[0]}, {best_theta[3], best_theta[2]}, {best_iter, best_fit}};
      exp6 = '{{best_theta[1], best_theta[0]}, {best_theta[3], best_theta[2]}, {best_theta[5], best_theta[4]}, {best_iter, best_fit}};
      i4 = 0; i6 = 0; nd4 = 0; nd6 = 0;
      start = 1;
      @(negedge clk); start = 0;
      for (int d = 0; d < MAX_DIMS; d++) best_theta[d] = $urandom;   // must have been captured
      for (int c = 0; c < 60; c++) begin
        m_axis_tready = ($urandom_range(0, 2) != 0);
        @(negedge clk);
      end
      m_axis_tready = 0;
      checks += 4;
      if (i4 != 3 || i6 != 4) begin failures++; $display("FAIL beats %0d %0d", i4, i6); end
      if (nd4 != 1 || nd6 != 1) begin failures++; $display("FAIL done %0d %0d", nd4, nd6); end
      if (tv4 || tv6) begin failures++; $display("FAIL valid left high"); end
      if (r == 199 && stalls == 0) begin failures++; $display("FAIL no stall seen"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
