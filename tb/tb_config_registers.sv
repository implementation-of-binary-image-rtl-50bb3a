// tb_config_registers: reset values, then random writes to every register
// of the map; read-back and the decoded configuration fields must match a
// model of the register map, and writes to unused addresses change nothing.
module tb_config_registers;
  import bip_pkg::*;
  localparam int N = 5, U = 4;
  logic clk = 0, rst_n = 0, we = 0;
  logic [7:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [15:0] width, height;
  logic [1:0] out_sel;
  bcu_cfg_t cfg [U];
  int checks = 0, failures = 0;
  logic [31:0] model [256];

  config_registers #(.N(N), .MAX_W(640), .MAX_H(480), .NUM_BCU(U)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata),
    .width(width), .height(height), .out_sel(out_sel), .cfg(cfg));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] keep_mask(int a);
    if (a == 0 || a == 1) return 32'h0000_FFFF;
    if (a == 2) return 32'h3;
    if (a >= 16 && a < 16 * (U + 1)) begin
      case (a % 16)
        0: return 32'h000F_FFFF;
        1, 4: return 32'h0000_7FFF;
        2, 3, 5, 6: return 32'hFFFF_FFFF;
        default: return 32'h0;
      endcase
    end
    return 32'h0;
  endfunction

  task automatic check_fields();
    checks++;
    if (width !== model[0][15:0] || height !== model[1][15:0] || out_sel !== model[2][1:0]) begin
      failures++; $display("FAIL global fields");
    end
    for (int u = 0; u < U; u++) begin
      logic [31:0] c0, e0, e1;
      c0 = model[16 + 16*u]; e0 = model[17 + 16*u]; e1 = model[20 + 16*u];
      checks++;
      if (cfg[u].src !== c0[2:0] || 3'(cfg[u].set_a) !== c0[5:3] || 3'(cfg[u].set_b) !== c0[8:6] ||
          3'(cfg[u].sop) !== c0[11:9] || 3'(cfg[u].out_sel) !== c0[14:12] ||
          cfg[u].mask_size !== c0[18:15] || cfg[u].border !== c0[19] ||
          2'(cfg[u].e0.sel_a) !== e0[1:0] || 2'(cfg[u].e0.sel_b) !== e0[3:2] ||
          3'(cfg[u].e0.lop) !== e0[6:4] || 3'(cfg[u].e0.rop) !== e0[9:7] || cfg[u].e0.rank !== e0[14:10] ||
          cfg[u].e1.rank !== e1[14:10] ||
          2'(cfg[u].e1.sel_a) !== e1[1:0] || 3'(cfg[u].e1.rop) !== e1[9:7] ||
          cfg[u].e0.param0 !== model[18 + 16*u] || cfg[u].e0.param1 !== model[19 + 16*u] ||
          cfg[u].e1.param0 !== model[21 + 16*u] || cfg[u].e1.param1 !== model[22 + 16*u]) begin
        failures++; $display("FAIL unit %0d fields", u);
      end
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    model[0] = 640; model[1] = 480;
    for (int u = 0; u < U; u++) begin
      // src 0, set_a E0_LOG(1), set_b E1_LOG(4), sop PASS(5), out INPUT, mask N
      model[16 + 16*u] = (1 << 3) | (4 << 6) | (5 << 9) | (N << 15);
      model[17 + 16*u] = 0 | (2 << 2) | (7 << 4) | (6 << 7);
      model[20 + 16*u] = model[17 + 16*u];
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL reset read %h: %h exp %h", a, rdata, model[a]); end
    end
    check_fields();
    for (int t = 0; t < 3000; t++) begin
      int a;
      a = ($urandom % 2) ? int'($urandom % 3) : int'($urandom % 256);
      if (a >= 16 && a < 80 && $urandom % 2) a = 16 + 16 * ($urandom % 4) + ($urandom % 7);
      @(negedge clk);
      we = 1; addr = 8'(a); wdata = $urandom;
      if (keep_mask(a) == 32'hF_FFFF) wdata[18:15] = 4'(1 + 2 * ($urandom % 3));
      model[a] = wdata & keep_mask(a);
      @(negedge clk);
      we = 0;
      addr = 8'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin failures++; $display("FAIL read %h: %h exp %h", addr, rdata, model[addr]); end
      if (t % 50 == 0) check_fields();
    end
    check_fields();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
