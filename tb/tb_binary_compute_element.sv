// tb_binary_compute_element: random operand selections, operations, mask
// sizes and data. The registered logic, reduction and median results must
// match a per-bit software model one clock after en, and hold while en is
// low. Erosion and dilation settings of a 3x3 cross are checked explicitly.
module tb_binary_compute_element;
  import bip_pkg::*;
  localparam int N = 5, NN = N * N;
  logic clk = 0, rst_n = 0, en = 0;
  bce_cfg_t cfg;
  logic [NN-1:0] active, win, blk, logic_res;
  logic red_res, med_res;
  int checks = 0, failures = 0;

  binary_compute_element #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .cfg(cfg), .active(active), .win(win),
    .blk(blk), .logic_res(logic_res), .red_res(red_res), .med_res(med_res));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NN-1:0] src(int s, logic [31:0] p);
    case (s)
      0: return win;
      1: return blk;
      2: return p[NN-1:0];
      default: return '0;
    endcase
  endfunction

  task automatic check_once(input int m);
    logic [NN-1:0] a, b, l;
    int ones, cnt;
    logic r, md;
    active = '0;
    for (int i = 0; i < N; i++) for (int k = 0; k < N; k++)
      if (i >= 2 - m/2 && i <= 2 + m/2 && k >= 2 - m/2 && k <= 2 + m/2) active[i*N+k] = 1'b1;
    a = src(int'(cfg.sel_a), cfg.param0);
    b = src(int'(cfg.sel_b), cfg.param1);
    for (int i = 0; i < NN; i++) begin
      case (cfg.lop)
        LOP_AND:  l[i] = a[i] & b[i];
        LOP_OR:   l[i] = a[i] | b[i];
        LOP_NOT:  l[i] = !a[i];
        LOP_NAND: l[i] = !(a[i] & b[i]);
        LOP_NOR:  l[i] = !(a[i] | b[i]);
        LOP_XOR:  l[i] = a[i] ^ b[i];
        LOP_XNOR: l[i] = !(a[i] ^ b[i]);
        default:  l[i] = a[i];
      endcase
    end
    ones = 0; cnt = 0;
    for (int i = 0; i < NN; i++) if (active[i]) begin cnt++; ones += int'(l[i]); end
    case (cfg.rop)
      ROP_AND:  r = (ones == cnt);
      ROP_OR:   r = (ones > 0);
      ROP_NAND: r = (ones != cnt);
      ROP_NOR:  r = (ones == 0);
      ROP_XOR:  r = ones[0];
      ROP_XNOR: r = !ones[0];
      default:  r = l[12];
    endcase
    md = (cfg.rank == 0) ? (2 * ones > cnt) : (ones >= int'(cfg.rank));
    @(negedge clk); en = 1;
    @(negedge clk); en = 0;
    checks++;
    if (logic_res !== l || red_res !== r || med_res !== md) begin
      failures++;
      $display("FAIL cfg=%p m=%0d l=%h/%h r=%b/%b med=%b/%b", cfg, m, logic_res, l, red_res, r, med_res, md);
    end
    win = ~win; blk = ~blk;
    @(negedge clk);
    checks++;
    if (logic_res !== l || red_res !== r || med_res !== md) begin
      failures++;
      $display("FAIL results changed while en low");
    end
  endtask

  localparam logic [NN-1:0] CROSS = 25'h0023880; // 3x3 cross, bits 7,11,12,13,17

  initial begin
    cfg = '0; win = '0; blk = '0; active = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      cfg.sel_a  = in_sel_e'($urandom % 4);
      cfg.sel_b  = in_sel_e'($urandom % 4);
      cfg.lop    = logic_op_e'($urandom % 8);
      cfg.rop    = red_op_e'($urandom % 7);
      cfg.rank   = ($urandom % 2) ? 5'd0 : 5'($urandom % 26);
      cfg.param0 = $urandom;
      cfg.param1 = $urandom;
      win = NN'($urandom); blk = NN'($urandom);
      if ($urandom % 4 == 0) win = '1;
      check_once(1 + 2 * int'($urandom % 3));
    end
    // erosion by a cross: 1 only if all five cross pixels are set
    cfg = '0;
    cfg.sel_a = ISEL_WINDOW; cfg.sel_b = ISEL_PARAM; cfg.param1 = 32'(~CROSS);
    cfg.lop = LOP_OR; cfg.rop = ROP_AND;
    for (int t = 0; t < 200; t++) begin
      logic [NN-1:0] w0;
      w0  = NN'($urandom) | ((t % 2) ? CROSS : '0);
      win = w0;
      check_once(3);
      checks++;
      if (red_res !== ((w0 & CROSS) == CROSS)) begin
        failures++;
        $display("FAIL erosion by cross: win=%h got %b", w0, red_res);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
