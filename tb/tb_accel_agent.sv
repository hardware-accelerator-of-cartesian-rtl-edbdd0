// tb_accel_agent - drives one accelerator instance with a given number of VRCs.
//
// Holds a cgp_accel with N_VRC = NV on a W x H random image pair, the two SRAM
// models and a simple processor model. For NEVAL evaluations, alternating
// between the two banks, it writes NV random offspring (section 1 complete,
// sections 2..NV as differences to section 1), sets the bank valid, polls the
// valid bits until the bank has been evaluated, and compares the reported best
// fitness and VRC index with the reference model. During the third
// evaluation it clears run and sets it again, which must not lose the bank.
// Results are returned on done/checks/failures for the enclosing testbench.
module tb_accel_agent #(
  parameter int NV    = 4,
  parameter int W     = 16,
  parameter int H     = 16,
  parameter int NEVAL = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import cgp_pkg::*;
  import cgp_ref_pkg::*;

  localparam int AW = $clog2(W * H);

  logic ppc_we = 0, ppc_re = 0;
  logic [PPC_AW-1:0] ppc_addr = '0;
  logic [31:0] ppc_wdata = '0, ppc_rdata;
  logic irq;
  logic [AW-1:0] sram1_addr, sram2_addr;
  logic sram1_re, sram2_re;
  logic [7:0] sram1_rdata, sram2_rdata;

  cgp_accel #(.N_VRC(NV), .W(W), .H(H)) dut (.clk, .rst_n, .ppc_we, .ppc_re, .ppc_addr,
    .ppc_wdata, .ppc_rdata, .irq, .sram1_addr, .sram1_re, .sram1_rdata, .sram2_addr,
    .sram2_re, .sram2_rdata);

  byte unsigned img[], tgt[];
  always_ff @(posedge clk) begin
    if (sram1_re) sram1_rdata <= img[sram1_addr];
    if (sram2_re) sram2_rdata <= tgt[sram2_addr];
  end

  task automatic ppc_wr(input int a, input logic [31:0] d);
    @(negedge clk); ppc_we = 1; ppc_addr = PPC_AW'(a); ppc_wdata = d;
    @(negedge clk); ppc_we = 0;
  endtask

  task automatic ppc_rd(input int a, output logic [31:0] d);
    @(negedge clk); ppc_re = 1; ppc_addr = PPC_AW'(a);
    @(posedge clk); #1; d = ppc_rdata;
    @(negedge clk); ppc_re = 0;
  endtask

  initial begin
    bitstream_t off [NV];
    logic [31:0] v, r;
    done = 0; checks = 0; failures = 0;
    img = new[W * H]; tgt = new[W * H];
    foreach (img[i]) begin img[i] = 8'($urandom); tgt[i] = 8'($urandom); end
    @(posedge rst_n);
    ppc_wr(REG_BASE + REG_CTRL, 1);
    for (int e = 0; e < NEVAL; e++) begin
      int b, f, m, mi;
      b = e % 2;
      for (int i = 0; i < NV; i++) off[i] = rand_bitstream();
      if (NV > 2 && e == 1) off[2] = off[1];   // a tie
      for (int s = 0; s < NV; s++)
        for (int c = 0; c < 8; c++)
          for (int h = 0; h < 2; h++) begin
            logic [63:0] wv;
            wv = (s == 0) ? off[0][c] : off[0][c] ^ off[s][c];
            ppc_wr(s * SEC_STRIDE + (b * 8 + c) * 2 + h, wv[32*h +: 32]);
          end
      ppc_wr(REG_BASE + REG_VALID, 32'(1) << b);
      if (e == 2) begin
        // stop in the middle of the evaluation and start again: the bank
        // stays valid and is evaluated from the beginning after the restart
        repeat (W * H / 2 + 5 * W) @(posedge clk);
        ppc_wr(REG_BASE + REG_CTRL, 0);
        repeat (20) @(posedge clk);
        ppc_rd(REG_BASE + REG_VALID, v);
        checks++; if (!v[b]) failures++;
        ppc_wr(REG_BASE + REG_CTRL, 1);
      end
      do ppc_rd(REG_BASE + REG_VALID, v); while (v[b]);
      ppc_rd(REG_BASE + REG_RESULT + b, r);
      m = 1 << 30; mi = 0;
      for (int i = 0; i < NV; i++) begin
        f = ref_fitness(off[i], W, H, img, tgt);
        if (f < m) begin m = f; mi = i; end
      end
      checks++;
      if (!r[31] || int'(r[23:0]) != m || int'(r[27:24]) != mi) begin
        failures++;
        $display("NV=%0d eval %0d: got %0d/%0d exp %0d/%0d", NV, e, r[23:0], r[27:24], m, mi);
      end
    end
    ppc_rd(REG_BASE + REG_EVALS, v);
    checks++; if (int'(v) != NEVAL) failures++;
    done = 1;
  end
endmodule
