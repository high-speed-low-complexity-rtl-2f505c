// tb_rs_decoder: end-to-end test of the RS(255,239) decoder with both
// key-equation solvers (pRiBM, the default, and PF-RiBM), fed the same
// stream. Random messages are encoded, hit by 0..8 random symbol errors
// (among them error-free words, words with exactly t = 8 errors and errors
// on the first and last symbols) and sent back to back or with idle gaps.
// Every output word must equal the transmitted codeword, out_err must mark
// exactly the error positions, and the first corrected symbol must leave
// 297 (pRiBM) or 488 (PF-RiBM) cycles after the first received one.
// Counted mechanisms: corrected symbols, words with t errors, error-free
// words, back-to-back words, a pause between words, RiBM swap (MC = 1) and
// hold decisions in both solvers, the pRiBM zero-inserted cycles and the
// PF-RiBM 14-cycle iterations; each must occur.
module tb_rs_decoder;
  import rs_ref_pkg::*;

  localparam int NWORDS = 12;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n, in_valid, in_sop;
  logic [7:0] in_data;
  logic       ov [2], os [2], oe [2];
  logic [7:0] od [2];
  int checks = 0, failures = 0;

  rs_decoder                 u_p  (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sop(in_sop), .in_data(in_data),
                                   .out_valid(ov[0]), .out_sop(os[0]), .out_data(od[0]), .out_err(oe[0]));
  rs_decoder #(.FOLDED(1'b1)) u_pf (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sop(in_sop), .in_data(in_data),
                                   .out_valid(ov[1]), .out_sop(os[1]), .out_data(od[1]), .out_err(oe[1]));

  initial begin
    repeat (NWORDS * 300 + 2000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cw_t        tx [NWORDS];
  logic [7:0] emask [NWORDS][255];
  int         sop_cycle [NWORDS];
  int         cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int n_corr [2] = '{0, 0};
  int n_words_done [2] = '{0, 0};
  int n_t_words = 0, n_clean_words = 0, n_b2b = 0, n_gap = 0;
  int wi [2] = '{-1, -1};
  int si [2] = '{0, 0};
  localparam int LAT [2] = '{297, 488};

  // key-equation solver mechanisms, observed inside the two decoders
  int n_swap_p = 0, n_hold_p = 0, n_zero_slot_p = 0, n_swap_pf = 0, n_hold_pf = 0, n_iter_pf = 0;
  always @(posedge clk) if (rst_n) begin
    if (u_p.g_p.u_kes.busy) begin
      if (!u_p.g_p.u_kes.u_ctrl.phase_q) n_zero_slot_p++;
      else if (u_p.g_p.u_kes.mc)         n_swap_p++;
      else                               n_hold_p++;
    end
    if (u_pf.g_pf.u_kes.u_ctrl.run_q && u_pf.g_pf.u_kes.cyc == 4'd13) begin
      n_iter_pf++;
      if (u_pf.g_pf.u_kes.mc) n_swap_pf++;
      else                    n_hold_pf++;
    end
  end

  // output checkers, one per decoder
  for (genvar d = 0; d < 2; d++) begin : g_chk
    always @(negedge clk) if (rst_n && ov[d]) begin
      if (os[d]) begin
        wi[d]++; si[d] = 0;
        checks++;
        if (wi[d] < NWORDS && cycle - sop_cycle[wi[d]] != LAT[d]) begin
          failures++;
          $display("dec%0d word %0d latency %0d", d, wi[d], cycle - sop_cycle[wi[d]]);
        end
      end
      if (wi[d] >= 0 && wi[d] < NWORDS && si[d] < 255) begin
        int j;
        j = 254 - si[d];
        checks += 2;
        if (od[d] !== tx[wi[d]][j]) begin
          failures++;
          if (failures < 10) $display("dec%0d word %0d R%0d: %h exp %h", d, wi[d], j, od[d], tx[wi[d]][j]);
        end
        if (oe[d] != (emask[wi[d]][j] != 0)) failures++;
        if (oe[d]) n_corr[d]++;
        si[d]++;
        if (si[d] == 255) n_words_done[d]++;
      end else begin
        failures++;
        $display("dec%0d unexpected output", d);
      end
    end
  end

  initial begin
    logic [7:0] msg [239];
    cw_t w;
    int nerr, p, cnt;
    rst_n = 0; in_valid = 0; in_sop = 0; in_data = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int n = 0; n < NWORDS; n++) begin
      for (int j = 0; j < 239; j++) msg[j] = 8'($urandom);
      tx[n] = encode(msg);
      for (int j = 0; j < 255; j++) emask[n][j] = 0;
      nerr = (n % 4 == 0) ? 0 : ((n % 4 == 1) ? 8 : $urandom_range(8, 1));
      if (n == 2) begin emask[n][254] = 8'h5a; emask[n][0] = 8'h01; end
      cnt = 0;
      for (int j = 0; j < 255; j++) if (emask[n][j] != 0) cnt++;
      while (cnt < nerr) begin
        p = $urandom_range(254);
        if (emask[n][p] == 0) begin emask[n][p] = 8'($urandom_range(255, 1)); cnt++; end
      end
      if (cnt == 0) n_clean_words++;
      if (cnt == 8) n_t_words++;
      for (int j = 0; j < 255; j++) w[j] = tx[n][j] ^ emask[n][j];
      if (n > 0 && n % 3 == 0) begin
        repeat (1 + n) @(negedge clk);
        n_gap++;
      end else if (n > 0) n_b2b++;
      for (int j = 254; j >= 0; j--) begin
        in_valid = 1; in_sop = (j == 254); in_data = w[j];
        if (j == 254) sop_cycle[n] = cycle;
        @(negedge clk);
      end
      in_valid = 0; in_sop = 0; in_data = 8'($urandom);
    end
    repeat (600) @(negedge clk);
    for (int d = 0; d < 2; d++) begin
      checks += 2;
      if (n_words_done[d] != NWORDS) begin failures++; $display("dec%0d decoded %0d words", d, n_words_done[d]); end
      if (n_corr[d] == 0) failures++;
      $display("dec%0d: words=%0d corrected symbols=%0d", d, n_words_done[d], n_corr[d]);
    end
    checks += 6;
    if (n_swap_p == 0 || n_hold_p == 0 || n_swap_pf == 0 || n_hold_pf == 0) failures++;
    if (n_zero_slot_p != NWORDS * 2 * 8) failures++;        // 2t zero cycles per word
    if (n_iter_pf != NWORDS * 2 * 8) failures++;            // 2t folded iterations per word
    $display("pRiBM: swaps=%0d holds=%0d zero-inserted cycles=%0d; PF-RiBM: iterations=%0d swaps=%0d holds=%0d",
             n_swap_p, n_hold_p, n_zero_slot_p, n_iter_pf, n_swap_pf, n_hold_pf);
    checks += 4;
    if (n_t_words == 0) failures++;
    if (n_clean_words == 0) failures++;
    if (n_b2b == 0) failures++;
    if (n_gap == 0) failures++;
    $display("t-error words=%0d error-free words=%0d back-to-back=%0d after pause=%0d",
             n_t_words, n_clean_words, n_b2b, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
