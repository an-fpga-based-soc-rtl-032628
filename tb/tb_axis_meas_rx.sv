// tb_axis_meas_rx: streams records of random length with random TVALID gaps;
// checks every buffer write (address, lower 96 bits), that TREADY is low
// before start and after TLAST, the final count, the done pulse and that
// beats beyond DEPTH are dropped.
module tb_axis_meas_rx;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0, start = 0;
  logic [127:0] s_axis_tdata = 0;
  logic s_axis_tvalid = 0, s_axis_tready, s_axis_tlast = 0;
  logic mem_we, done;
  logic [5:0] mem_waddr;
  logic [95:0] mem_wdata;
  logic [6:0] count;
  logic [95:0] sent [$];
  int writes, checks = 0, failures = 0;

  axis_meas_rx #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && mem_we) begin
    checks++;
    if (mem_waddr != 6'(writes) || mem_wdata !== sent[writes]) begin
      failures++;
      $display("FAIL write %0d addr %0d data %h", writes, mem_waddr, mem_wdata);
    end
    writes++;
  end

  initial begin
    int len, gotdone;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (s_axis_tready) begin failures++; $display("FAIL ready before start"); end
    for (int rec = 0; rec < 40; rec++) begin
      len = (rec == 0) ? 1 : (rec == 1) ? DEPTH + 5 : $urandom_range(1, DEPTH);
      sent.delete(); writes = 0; gotdone = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int b = 0; b < len; b++) begin
        while ($urandom_range(0, 2) == 0) begin
          s_axis_tvalid = 0;
          @(negedge clk);
          if (done) gotdone++;
        end
        s_axis_tvalid = 1;
        s_axis_tdata = {$urandom, $urandom, $urandom, $urandom};
        s_axis_tlast = (b == len - 1);
        if (b < DEPTH) sent.push_back(s_axis_tdata[95:0]);
        checks++;
        if (!s_axis_tready) begin failures++; $display("FAIL not ready"); end
        @(negedge clk);
        if (done) gotdone++;
      end
      s_axis_tvalid = 0; s_axis_tlast = 0;
      checks += 4;
      if (s_axis_tready) begin failures++; $display("FAIL ready after last"); end
      if (gotdone != 1) begin failures++; $display("FAIL done count %0d", gotdone); end
      if (int'(count) != ((len > DEPTH) ? DEPTH : len)) begin failures++; $display("FAIL count %0d len %0d", count, len); end
      if (writes != ((len > DEPTH) ? DEPTH : len)) begin failures++; $display("FAIL writes %0d", writes); end
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
