// tb_delay_fifo: writes a random word every cycle into delay_fifo at its
// default depth and at a small depth, and checks each word comes out
// exactly DEPTH cycles later.
module tb_delay_fifo;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  logic [7:0] din, dout_big, dout_small;
  int checks = 0, failures = 0;

  delay_fifo                        u_big   (.clk(clk), .rst_n(rst_n), .din(din), .dout(dout_big));
  delay_fifo #(.W(8), .DEPTH(5))    u_small (.clk(clk), .rst_n(rst_n), .din(din), .dout(dout_small));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] hist [2000];

  initial begin
    rst_n = 0; din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      din = 8'($urandom);
      hist[c] = din;
      #1;
      if (c >= 297) begin
        checks++;
        if (dout_big !== hist[c-297]) begin failures++; if (failures < 5) $display("big c%0d %h exp %h", c, dout_big, hist[c-297]); end
      end
      if (c >= 5) begin
        checks++;
        if (dout_small !== hist[c-5]) begin failures++; if (failures < 5) $display("small c%0d", c); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
