// tb_adc_lvds_if - self-checking test of the serial LVDS converter interface (C2).
//
// Two interfaces are tested side by side: one whose converter model starts
// each word on a rising bit-clock edge and one whose words start on a falling
// edge (the case the data multiplexer swaps). The converter inputs change
// randomly every 3 ns. After the frame logic has locked (at most three words),
// every deserialized word must equal, in order and without gaps, the word the
// model sent on each of the six lines. Starts of conversion come every 1 us;
// data must then be the PICK_WORD-th word that follows, with one valid each.
// Both multiplexer settings must be seen.
`timescale 1ns/1ps
module tb_adc_lvds_if;
  import vr_pkg::*;
  localparam int N_CH = 6;
  logic clk = 0, rst_n = 0, soc = 0;
  logic [N_CH-1:0][11:0] ain;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  logic [1:0]                   lclk, frame;
  logic [1:0][N_CH-1:0]         dout;
  logic [1:0][N_CH-1:0][11:0]   sent;
  realtime                      sent_t [2];
  int                           sent_cnt [2];
  adc_word_t [1:0][N_CH-1:0]    word, data;
  logic [1:0]                   word_valid, valid;

  ads5240_model #(.N_CH(N_CH), .ODD_START(1'b0)) u_m0 (.ain, .lclk(lclk[0]), .frame(frame[0]), .dout(dout[0]),
                                                       .sent(sent[0]), .sent_t(sent_t[0]), .sent_cnt(sent_cnt[0]));
  ads5240_model #(.N_CH(N_CH), .ODD_START(1'b1)) u_m1 (.ain, .lclk(lclk[1]), .frame(frame[1]), .dout(dout[1]),
                                                       .sent(sent[1]), .sent_t(sent_t[1]), .sent_cnt(sent_cnt[1]));

  for (genvar k = 0; k < 2; k++) begin : g_if
    adc_lvds_if #(.N_CH(N_CH)) dut (
      .clk0(lclk[k]), .clk180(~lclk[k]), .frame(frame[k]), .sdata(dout[k]),
      .clk, .rst_n, .soc, .word(word[k]), .word_valid(word_valid[k]), .data(data[k]), .valid(valid[k]));

    logic [N_CH-1:0][11:0] q[$];
    int  locked = 0, skipped = 0, n_words = 0, since_soc = -1, n_pick = 0;
    adc_word_t [N_CH-1:0] pick_exp;

    always @(sent_cnt[k]) if (rst_n) q.push_back(sent[k]);

    always @(posedge clk) if (rst_n) begin
      if (word_valid[k]) begin
        n_words++;
        if (!locked) begin
          while (q.size() > 0 && q[0] != word[k] && skipped < 4) begin void'(q.pop_front()); skipped++; end
          if (q.size() > 0 && q[0] == word[k]) locked = 1;
        end
        if (locked) begin
          checks++;
          if (q.size() == 0 || q[0] != word[k]) begin
            failures++;
            if (failures < 10) $display("if %0d: word %h expected %h", k, word[k], (q.size() > 0) ? q[0] : '0);
          end
          if (q.size() > 0) void'(q.pop_front());
        end else if (n_words > 3) begin
          failures++; checks++; $display("if %0d: no lock", k); locked = 1;
        end
        if (since_soc >= 0) begin
          since_soc++;
          if (since_soc == 7) pick_exp = word[k];
        end
      end
      if (soc) since_soc = 0;
      if (valid[k]) begin
        n_pick++;
        checks++;
        if (data[k] != pick_exp || since_soc != 7) begin
          failures++; $display("if %0d: picked %h after %0d words, expected the 7th", k, data[k], since_soc);
        end
        since_soc = -1;
      end
    end
  end

  initial begin
    ain = '0;
    forever begin #3; for (int c = 0; c < N_CH; c++) ain[c] = 12'($urandom); end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);
    for (int n = 0; n < 40; n++) begin
      @(negedge clk) soc = 1;
      @(negedge clk) soc = 0;
      repeat (123) @(negedge clk);
    end
    checks += 3;
    if (g_if[0].n_pick != 40 || g_if[1].n_pick != 40) begin
      failures++; $display("picks %0d %0d, expected 40", g_if[0].n_pick, g_if[1].n_pick);
    end
    if (g_if[0].dut.ena_mux != 1'b0) begin failures++; $display("even start: ena_mux set"); end
    if (g_if[1].dut.ena_mux != 1'b1) begin failures++; $display("odd start: ena_mux clear"); end
    $display("words checked: %0d and %0d", g_if[0].n_words, g_if[1].n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
