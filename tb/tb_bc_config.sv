// tb_bc_config: loads two random configuration words through the serial
// input, stores them in the two RAM words with write_en, and checks that
// cfg is zero while read_en is low, shows the chosen word while it is high,
// switches word with rd_sel in the same cycle, and that sdo delivers the
// shifted-in bits W cycles later.
`timescale 1ps / 1fs
module tb_bc_config;
  localparam int unsigned W = 32;
  int checks = 0, failures = 0;
  logic clk = 0, shift_en = 0, sdi = 0, write_en = 0, wr_sel = 0, read_en = 0, rd_sel = 0;
  logic sdo;
  logic [W-1:0] cfg;
  logic [W-1:0] word [2];
  logic [2*W-1:0] sent;

  bc_config #(.W(W)) dut (.clk(clk), .shift_en(shift_en), .sdi(sdi), .sdo(sdo),
    .write_en(write_en), .wr_sel(wr_sel), .read_en(read_en), .rd_sel(rd_sel), .cfg(cfg));

  always #50 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic shift_word(input logic [W-1:0] w);
    // the top bit goes first, so that bit b ends in position b
    for (int b = W - 1; b >= 0; b--) begin
      @(negedge clk);
      shift_en = 1; sdi = w[b];
      @(posedge clk);
    end
    @(negedge clk);
    shift_en = 0;
  endtask

  task automatic store(input logic sel);
    @(negedge clk);
    write_en = 1; wr_sel = sel;
    @(negedge clk);
    write_en = 0;
  endtask

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      word[0] = $urandom; word[1] = $urandom;
      read_en = 0;
      #1;
      checks++;
      if (cfg !== '0) begin failures++; $display("FAIL cfg not off with read_en low"); end
      shift_word(word[0]);
      store(0);
      // sdo presents the bits of word[0] as the next word is shifted in
      for (int b = W - 1; b >= 0; b--) begin
        @(negedge clk);
        checks++;
        if (sdo !== word[0][b]) begin failures++; $display("FAIL sdo bit %0d", b); end
        shift_en = 1; sdi = word[1][b];
        @(posedge clk);
      end
      @(negedge clk); shift_en = 0;
      store(1);
      checks++;
      if (cfg !== '0) begin failures++; $display("FAIL cfg leaked before read_en"); end
      read_en = 1; rd_sel = 0;
      #1;
      checks++;
      if (cfg !== word[0]) begin failures++; $display("FAIL word0 %h exp %h", cfg, word[0]); end
      rd_sel = 1;
      #1;
      checks++;
      if (cfg !== word[1]) begin failures++; $display("FAIL word1 %h exp %h", cfg, word[1]); end
      // shifting new data must not disturb the stored words
      shift_word(~word[1]);
      checks++;
      if (cfg !== word[1]) begin failures++; $display("FAIL word1 disturbed by shift"); end
      read_en = 0;
      #1;
      checks++;
      if (cfg !== '0) begin failures++; $display("FAIL cfg not off after read_en low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
