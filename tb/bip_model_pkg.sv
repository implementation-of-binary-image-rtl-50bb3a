// bip_model_pkg: software reference model of the binary compute units, used
// by the testbenches. It works on whole frames held in dynamic arrays
// (pixel (x, y) at index y*width + x) and computes each unit's output frame
// directly from the definitions: the N x N neighbourhood with border value,
// the bitwise operation, the reduction, the majority median, the set
// operation and the tap selection. It shares only the type and encoding
// definitions with the design.
package bip_model_pkg;
  import bip_pkg::*;

  typedef bit frame_t [];

  // external block offered to unit u for output pixel p (any fixed hash)
  function automatic logic [31:0] blk_of(int u, int p);
    logic [31:0] h;
    h = 32'(p) * 32'h9E3779B1 + 32'(u) * 32'h85EBCA6B;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    return h ^ (h >> 12);
  endfunction

  function automatic bit elem_logic(logic_op_e op, bit a, bit b);
    case (op)
      LOP_AND:  return a & b;
      LOP_OR:   return a | b;
      LOP_NOT:  return !a;
      LOP_NAND: return !(a & b);
      LOP_NOR:  return !(a | b);
      LOP_XOR:  return a ^ b;
      LOP_XNOR: return !(a ^ b);
      default:  return a;
    endcase
  endfunction

  // one unit on a whole frame; n is the window size of the hardware
  function automatic frame_t unit_model(input frame_t img, input int w, input int h,
                                        input int n, input bcu_cfg_t cfg, input int u);
    frame_t res;
    int c, m;
    c = (n - 1) / 2;
    m = int'(cfg.mask_size);
    res = new[w * h];
    for (int p = 0; p < w * h; p++) begin
      int x, y;
      bit taps [8];
      bit win [64];
      logic [31:0] bk;
      x = p % w; y = p / w;
      bk = blk_of(u, p);
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          int xx, yy;
          xx = x + j - c; yy = y + i - c;
          win[i*n+j] = (xx < 0 || yy < 0 || xx >= w || yy >= h) ? cfg.border : img[yy*w+xx];
        end
      taps[0] = img[p];
      for (int e = 0; e < 2; e++) begin
        bce_cfg_t ec;
        int ones, cnt;
        bit lc, r;
        ec = (e == 0) ? cfg.e0 : cfg.e1;
        ones = 0; cnt = 0;
        for (int i = 0; i < n; i++)
          for (int j = 0; j < n; j++) begin
            bit a, b, l;
            int k;
            k = i*n + j;
            case (ec.sel_a)
              ISEL_WINDOW: a = win[k];
              ISEL_BLOCK:  a = bk[k];
              ISEL_PARAM:  a = ec.param0[k];
              default:     a = 0;
            endcase
            case (ec.sel_b)
              ISEL_WINDOW: b = win[k];
              ISEL_BLOCK:  b = bk[k];
              ISEL_PARAM:  b = ec.param1[k];
              default:     b = 0;
            endcase
            l = elem_logic(ec.lop, a, b);
            if (i == c && j == c) lc = l;
            if ((i - c) <= m/2 && (c - i) <= m/2 && (j - c) <= m/2 && (c - j) <= m/2) begin
              cnt++;
              ones += int'(l);
            end
          end
        case (ec.rop)
          ROP_AND:  r = (ones == cnt);
          ROP_OR:   r = (ones != 0);
          ROP_NAND: r = (ones != cnt);
          ROP_NOR:  r = (ones == 0);
          ROP_XOR:  r = ones[0];
          ROP_XNOR: r = !ones[0];
          default:  r = lc;
        endcase
        taps[1 + 3*e] = lc;
        taps[2 + 3*e] = r;
        taps[3 + 3*e] = (ec.rank == 0) ? (2 * ones > cnt) : (ones >= int'(ec.rank));
      end
      begin
        bit sa, sb, s;
        sa = (cfg.set_a == TAP_SET) ? 1'b0 : taps[int'(cfg.set_a)];
        sb = (cfg.set_b == TAP_SET) ? 1'b0 : taps[int'(cfg.set_b)];
        case (cfg.sop)
          SOP_UNION:     s = sa | sb;
          SOP_INTERSECT: s = sa & sb;
          SOP_COMPL:     s = !sa;
          SOP_SUBTRACT:  s = sa & !sb;
          SOP_XOR:       s = sa ^ sb;
          default:       s = sa;
        endcase
        taps[7] = s;
      end
      res[p] = taps[int'(cfg.out_sel)];
    end
    return res;
  endfunction

  // ready-made unit settings
  function automatic bcu_cfg_t cfg_pass();
    bcu_cfg_t c;
    c = '0;
    c.set_a = TAP_E0_LOG; c.set_b = TAP_E1_LOG; c.sop = SOP_PASS; c.out_sel = TAP_INPUT;
    c.mask_size = 4'd3;
    c.e0.sel_a = ISEL_WINDOW; c.e0.sel_b = ISEL_PARAM; c.e0.lop = LOP_PASS; c.e0.rop = ROP_PASS;
    c.e0.rank = '0;
    c.e1 = c.e0;
    return c;
  endfunction

  // erosion (ero = 1) or dilation (ero = 0) by a full square of size m
  function automatic bcu_cfg_t cfg_morph(bit ero, int m, int src);
    bcu_cfg_t c;
    c = cfg_pass();
    c.src = 3'(src);
    c.mask_size = 4'(m);
    c.border = ero;            // border neutral for the operation
    c.e0.param1 = ero ? 32'h0 : 32'hFFFF_FFFF;
    c.e0.lop = ero ? LOP_OR : LOP_AND;
    c.e0.rop = ero ? ROP_AND : ROP_OR;
    c.out_sel = TAP_E0_RED;
    return c;
  endfunction

  function automatic bcu_cfg_t cfg_random(int src_max);
    bcu_cfg_t c;
    c = cfg_pass();
    c.src = 3'($urandom % (src_max + 1));
    c.set_a = tap_e'($urandom % 7);
    c.set_b = tap_e'($urandom % 7);
    c.sop = set_op_e'($urandom % 6);
    c.out_sel = tap_e'($urandom % 8);
    c.mask_size = 4'(1 + 2 * ($urandom % 3));
    c.border = 1'($urandom);
    for (int e = 0; e < 2; e++) begin
      bce_cfg_t ec;
      ec.sel_a = in_sel_e'($urandom % 4);
      ec.sel_b = in_sel_e'($urandom % 4);
      ec.lop = logic_op_e'($urandom % 8);
      ec.rop = red_op_e'($urandom % 7);
      ec.rank = ($urandom % 2) ? 5'd0 : 5'($urandom % 26);
      ec.param0 = $urandom;
      ec.param1 = $urandom;
      if (e == 0) c.e0 = ec; else c.e1 = ec;
    end
    return c;
  endfunction

  // register words for a unit configuration (map of config_registers)
  function automatic logic [31:0] unit_ctrl_word(bcu_cfg_t c);
    return 32'(c.src) | (32'(c.set_a) << 3) | (32'(c.set_b) << 6) | (32'(c.sop) << 9) |
           (32'(c.out_sel) << 12) | (32'(c.mask_size) << 15) | (32'(c.border) << 19);
  endfunction

  function automatic logic [31:0] elem_ctrl_word(bce_cfg_t e);
    return 32'(e.sel_a) | (32'(e.sel_b) << 2) | (32'(e.lop) << 4) | (32'(e.rop) << 7) |
           (32'(e.rank) << 10);
  endfunction

endpackage
