// tb_rs_decoder_full: the decoder exactly as configured by default (pRiBM
// key-equation solver, RS(255,239), t = 8) decodes a stream of back-to-back
// words carrying 0, 8, 8 and 5 symbol errors; every output word must equal
// the transmitted codeword, out_err must mark the error positions, and the
// output must start 297 cycles after the input. The sustained rate, one
// symbol per cycle with no gap between words, is checked too.
module tb_rs_decoder_full;
  import rs_ref_pkg::*;

  localparam int NWORDS = 4;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n, in_valid, in_sop, out_valid, out_sop, out_err;
  logic [7:0] in_data, out_data;
  int checks = 0, failures = 0;

  rs_decoder u_dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sop(in_sop), .in_data(in_data),
                    .out_valid(out_valid), .out_sop(out_sop), .out_data(out_data), .out_err(out_err));

  initial begin
    repeat (NWORDS * 255 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cw_t        tx [NWORDS];
  logic [7:0] emask [NWORDS][255];
  int         first_in = -1, first_out = -1, last_out = -1, nout = 0, ncorr = 0;
  int         cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    int wn, j;
    if (first_out < 0) first_out = cycle;
    last_out = cycle;
    wn = nout / 255; j = 254 - nout % 255;
    checks += 3;
    if (wn >= NWORDS) failures++;
    else begin
      if (out_data !== tx[wn][j]) begin
        failures++;
        if (failures < 10) $display("word %0d R%0d: %h exp %h", wn, j, out_data, tx[wn][j]);
      end
      if (out_err != (emask[wn][j] != 0)) failures++;
      if (out_sop != (j == 254)) failures++;
    end
    if (out_err) ncorr++;
    nout++;
  end

  initial begin
    logic [7:0] msg [239];
    int nerr, p, cnt;
    rst_n = 0; in_valid = 0; in_sop = 0; in_data = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int n = 0; n < NWORDS; n++) begin
      for (int j = 0; j < 239; j++) msg[j] = 8'($urandom);
      tx[n] = encode(msg);
      for (int j = 0; j < 255; j++) emask[n][j] = 0;
      nerr = (n == 0) ? 0 : ((n == 3) ? 5 : 8);
      cnt = 0;
      while (cnt < nerr) begin
        p = $urandom_range(254);
        if (emask[n][p] == 0) begin emask[n][p] = 8'($urandom_range(255, 1)); cnt++; end
      end
    end
    for (int n = 0; n < NWORDS; n++)
      for (int j = 254; j >= 0; j--) begin
        in_valid = 1; in_sop = (j == 254); in_data = tx[n][j] ^ emask[n][j];
        if (first_in < 0) first_in = cycle;
        @(negedge clk);
      end
    in_valid = 0; in_sop = 0;
    repeat (400) @(negedge clk);
    checks += 4;
    if (nout != NWORDS * 255) begin failures++; $display("%0d symbols out", nout); end
    if (first_out - first_in != 297) begin failures++; $display("latency %0d", first_out - first_in); end
    if (last_out - first_out != NWORDS * 255 - 1) begin failures++; $display("output not continuous"); end
    if (ncorr != 21) begin failures++; $display("%0d corrections", ncorr); end
    $display("latency=%0d cycles, corrected symbols=%0d", first_out - first_in, ncorr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
