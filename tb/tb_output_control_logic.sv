// tb_output_control_logic: random pixel streams on all units, one unit
// selected; the packed words must hold the selected unit's pixels LSB first,
// a partial last word must be flushed with word_last, and frames of several
// sizes (multiple of the word width or not) must pack correctly.
module tb_output_control_logic;
  localparam int U = 4, PW = 8;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [31:0] total = 0;
  logic [1:0] sel = 0;
  logic [U-1:0] unit_valid = 0, unit_pix = 0;
  logic word_valid, word_last;
  logic [PW-1:0] word;
  int checks = 0, failures = 0;
  logic [PW-1:0] words [$];
  logic lasts [$];

  output_control_logic #(.NUM_BCU(U), .PW(PW)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .total(total), .sel(sel),
    .unit_valid(unit_valid), .unit_pix(unit_pix),
    .word_valid(word_valid), .word(word), .word_last(word_last));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (word_valid) begin
    words.push_back(word);
    lasts.push_back(word_last);
  end

  task automatic frame(int n, int s);
    bit px [];
    int nw;
    px = new[n];
    sel = 2'(s); total = 32'(n);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    words.delete(); lasts.delete();
    for (int p = 0; p < n; p++) begin
      if ($urandom % 3 == 0) begin unit_valid = 0; @(negedge clk); end
      px[p] = 1'($urandom);
      unit_valid = 4'($urandom) | (4'b1 << s);
      unit_pix = 4'($urandom);
      unit_pix[s] = px[p];
      @(negedge clk);
    end
    unit_valid = 0;
    repeat (3) @(negedge clk);
    nw = (n + PW - 1) / PW;
    checks++;
    if (words.size() != nw) begin
      failures++;
      $display("FAIL n=%0d: %0d words, exp %0d", n, words.size(), nw);
    end else begin
      for (int k = 0; k < nw; k++) begin
        logic [PW-1:0] e;
        e = '0;
        for (int b = 0; b < PW; b++) if (k*PW + b < n) e[b] = px[k*PW + b];
        checks++;
        if (words[k] !== e || lasts[k] !== (k == nw - 1)) begin
          failures++;
          $display("FAIL n=%0d word %0d got %h/%b exp %h", n, k, words[k], lasts[k], e);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(64, 0);
    frame(45, 3);
    frame(7, 1);
    frame(100, 2);
    for (int t = 0; t < 20; t++) frame(1 + $urandom % 90, $urandom % 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
