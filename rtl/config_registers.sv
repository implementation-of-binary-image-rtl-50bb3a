// config_registers: the register group that configures the processor.
//
// The source description lists the configurable parameters (logic operations, image
// resolution, mask sizes, input and output selections, auxiliary values);
// the register map below and the bus are this design's. A single-cycle bus
// writes a 32-bit word when we is high and reads any register combinationally.
// Addresses (bip_pkg): 0x00 width, 0x01 height, 0x02 output unit, and a
// 16-word page per unit u at 0x10 + 16*u with its control word, the control
// word and two parameter words of each of its two compute elements.
// Reset values: full MAX_W x MAX_H frame, unit 0 routed out, every unit
// taking the image and passing its centre pixel straight through with an
// N x N mask and border value 0.
module config_registers
  import bip_pkg::*;
#(
  parameter int unsigned N       = 5,
  parameter int unsigned MAX_W   = 640,
  parameter int unsigned MAX_H   = 480,
  parameter int unsigned NUM_BCU = 4,
  localparam int unsigned SW = (NUM_BCU > 1) ? $clog2(NUM_BCU) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [7:0]    addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata,
  output logic [15:0]   width,
  output logic [15:0]   height,
  output logic [SW-1:0] out_sel,
  output bcu_cfg_t      cfg [NUM_BCU]
);

  function automatic bce_cfg_t bce_default();
    bce_cfg_t e;
    e.sel_a  = ISEL_WINDOW;
    e.sel_b  = ISEL_PARAM;
    e.lop    = LOP_PASS;
    e.rop    = ROP_PASS;
    e.rank   = '0;
    e.param0 = '0;
    e.param1 = '0;
    return e;
  endfunction

  function automatic logic [31:0] ctrl_word(input bcu_cfg_t c);
    return {12'd0, c.border, c.mask_size, 3'(c.out_sel), 3'(c.sop), 3'(c.set_b),
            3'(c.set_a), c.src};
  endfunction

  function automatic logic [31:0] ectl_word(input bce_cfg_t e);
    return {17'd0, e.rank, 3'(e.rop), 3'(e.lop), 2'(e.sel_b), 2'(e.sel_a)};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      width   <= 16'(MAX_W);
      height  <= 16'(MAX_H);
      out_sel <= '0;
      for (int u = 0; u < NUM_BCU; u++) begin
        cfg[u].src       <= 3'd0;
        cfg[u].set_a     <= TAP_E0_LOG;
        cfg[u].set_b     <= TAP_E1_LOG;
        cfg[u].sop       <= SOP_PASS;
        cfg[u].out_sel   <= TAP_INPUT;
        cfg[u].mask_size <= 4'(N);
        cfg[u].border    <= 1'b0;
        cfg[u].e0        <= bce_default();
        cfg[u].e1        <= bce_default();
      end
    end else if (we) begin
      unique case (addr)
        REG_WIDTH:  width   <= wdata[15:0];
        REG_HEIGHT: height  <= wdata[15:0];
        REG_OUTSEL: out_sel <= wdata[SW-1:0];
        default: begin
          for (int u = 0; u < NUM_BCU; u++) begin
            if (addr[7:4] == 4'(u + 1)) begin
              unique case (addr[3:0])
                UOFS_CTRL: begin
                  cfg[u].src       <= wdata[2:0];
                  cfg[u].set_a     <= tap_e'(wdata[5:3]);
                  cfg[u].set_b     <= tap_e'(wdata[8:6]);
                  cfg[u].sop       <= set_op_e'(wdata[11:9]);
                  cfg[u].out_sel   <= tap_e'(wdata[14:12]);
                  cfg[u].mask_size <= wdata[18:15];
                  cfg[u].border    <= wdata[19];
                end
                UOFS_E0CTL: begin
                  cfg[u].e0.sel_a <= in_sel_e'(wdata[1:0]);
                  cfg[u].e0.sel_b <= in_sel_e'(wdata[3:2]);
                  cfg[u].e0.lop   <= logic_op_e'(wdata[6:4]);
                  cfg[u].e0.rop   <= red_op_e'(wdata[9:7]);
                  cfg[u].e0.rank  <= wdata[14:10];
                end
                UOFS_E0P0: cfg[u].e0.param0 <= wdata;
                UOFS_E0P1: cfg[u].e0.param1 <= wdata;
                UOFS_E1CTL: begin
                  cfg[u].e1.sel_a <= in_sel_e'(wdata[1:0]);
                  cfg[u].e1.sel_b <= in_sel_e'(wdata[3:2]);
                  cfg[u].e1.lop   <= logic_op_e'(wdata[6:4]);
                  cfg[u].e1.rop   <= red_op_e'(wdata[9:7]);
                  cfg[u].e1.rank  <= wdata[14:10];
                end
                UOFS_E1P0: cfg[u].e1.param0 <= wdata;
                UOFS_E1P1: cfg[u].e1.param1 <= wdata;
                default: ;
              endcase
            end
          end
        end
      endcase
    end
  end

  always_comb begin
    rdata = '0;
    unique case (addr)
      REG_WIDTH:  rdata = 32'(width);
      REG_HEIGHT: rdata = 32'(height);
      REG_OUTSEL: rdata = 32'(out_sel);
      default: begin
        for (int u = 0; u < NUM_BCU; u++) begin
          if (addr[7:4] == 4'(u + 1)) begin
            unique case (addr[3:0])
              UOFS_CTRL:  rdata = ctrl_word(cfg[u]);
              UOFS_E0CTL: rdata = ectl_word(cfg[u].e0);
              UOFS_E0P0:  rdata = cfg[u].e0.param0;
              UOFS_E0P1:  rdata = cfg[u].e0.param1;
              UOFS_E1CTL: rdata = ectl_word(cfg[u].e1);
              UOFS_E1P0:  rdata = cfg[u].e1.param0;
              UOFS_E1P1:  rdata = cfg[u].e1.param1;
              default: ;
            endcase
          end
        end
      end
    endcase
  end

endmodule
