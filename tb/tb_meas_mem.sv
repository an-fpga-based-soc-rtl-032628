// tb_meas_mem: writes random words to random addresses while reading others,
// and checks every read against a software copy one clock after the address.
module tb_meas_mem;
  localparam int DEPTH = 2048;
  logic clk = 0, we = 0;
  logic [10:0] waddr = 0, raddr = 0;
  logic [95:0] wdata = 0, rdata;
  logic [95:0] model [DEPTH];
  bit          known [DEPTH];
  int checks = 0, failures = 0;

  meas_mem #(.DEPTH(DEPTH), .DW(96)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [95:0] expd;
    bit          expk;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 11'(i); wdata = {$urandom, $urandom, $urandom};
      model[i] = wdata; known[i] = 1;
    end
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 1) != 0);
      waddr = 11'($urandom_range(0, DEPTH - 1));
      wdata = {$urandom, $urandom, $urandom};
      raddr = 11'($urandom_range(0, DEPTH - 1));
      if (we && waddr == raddr) we = 0;
      expd = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 0;
      checks++;
      if (rdata !== expd) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", raddr, rdata, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
