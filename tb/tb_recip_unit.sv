// tb_recip_unit: 1/(1+f) for random and edge-case fitness values against the
// exact quotient floor(2^32 / (2^16 + f)); also checks the latency from
// `start` to `done` and that a start while busy is ignored.
module tb_recip_unit;
  localparam int LAT = 35;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [31:0] fitness = 0, quot;
  int checks = 0, failures = 0;

  recip_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned expq;
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      case (i)
        0: fitness = 0;
        1: fitness = 32'hFFFF_FFFF;
        2: fitness = 32'h0001_0000;
        default: fitness = $urandom >> $urandom_range(0, 31);
      endcase
      start = 1;
      @(negedge clk);
      start = 0;
      n = 1;
      fitness = 32'h1234;            // a start while busy must not disturb it
      start = (i % 3 == 0);
      while (!done && n < 100) begin
        @(negedge clk);
        start = 0;
        n++;
      end
      expq = (64'd1 << 32) / (64'h1_0000 + 64'((i == 0) ? 32'd0 : (i == 1) ? 32'hFFFF_FFFF : (i == 2) ? 32'h0001_0000 : 32'd0));
      checks += 2;
      if (n != LAT) begin failures++; $display("FAIL latency %0d", n); end
      if (i < 3 && quot !== 32'(expq)) begin
        failures++; $display("FAIL edge %0d got %h exp %h", i, quot, expq);
      end
    end
    // random values with exact model
    for (int i = 0; i < 1500; i++) begin
      logic [31:0] f;
      @(negedge clk);
      f = $urandom >> $urandom_range(0, 31);
      fitness = f; start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      expq = (64'd1 << 32) / (64'h1_0000 + 64'(f));
      checks++;
      if (quot !== 32'(expq)) begin failures++; $display("FAIL f=%h got %h exp %h", f, quot, expq); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
