// Testbench for ecs_regs: register write/read-back, command pulses, LUT
// write strobe and address fields, FIFO pop strobes and status read paths,
// with read data checked exactly two cycles after the read strobe.
module tb_ecs_regs;
  import sb_pkg::*;
  localparam int N = 28;
  logic clk = 0, rst_n = 0;
  logic [15:0] ecs_addr = '0;
  logic ecs_wr = 0, ecs_rd = 0;
  logic [31:0] ecs_wdata = '0, ecs_rdata;
  logic ecs_rvalid;
  logic [11:0] bcrst_delay;
  logic gen_en, chk_en, diag_arm, dbg_arm, cnt_clr;
  pat_mode_e gen_mode, chk_mode;
  logic [31:0] pattern;
  logic lut_we;
  logic [4:0] lut_ch;
  logic [7:0] lut_addr;
  logic [13:0] lut_wdata, lut_rdata;
  logic diag_pop [N];
  logic [31:0] diag_dout [N];
  logic [8:0] diag_count [N];
  logic dbg_pop [N_SCM];
  logic [31:0] dbg_dout [N_SCM];
  logic [8:0] dbg_count [N_SCM];
  logic [15:0] err_cnt [N], align_cnt [N], overflow_cnt [N], underflow_cnt [N];
  logic [47:0] chk_words [N];
  logic [31:0] chk_werr [N], chk_berr [N];
  int checks = 0, failures = 0, n_diag_pop = 0, n_dbg_pop = 0, n_arm = 0, n_lut_we = 0;

  ecs_regs #(.ROLE(ROLE_HCAL_MASTER), .N_CH(N)) dut (.*, .dr_occupancy(6'd9), .dr_accepts(16'd1234),
    .dr_overflows(16'd7), .running(1'b1), .bcid(12'd3001));

  always #5 clk = ~clk;

  // status sources: distinct values per channel
  always_comb begin
    for (int c = 0; c < N; c++) begin
      err_cnt[c] = 16'(c + 1); align_cnt[c] = 16'(c + 100); underflow_cnt[c] = 16'(c + 200); overflow_cnt[c] = 16'(c + 300);
      chk_words[c] = {16'(c + 7), 32'(c + 1000)}; chk_werr[c] = 32'(c + 2000); chk_berr[c] = 32'(c + 3000);
      diag_dout[c] = 32'hD000_0000 + 32'(c); diag_count[c] = 9'(c + 3);
    end
    for (int k = 0; k < N_SCM; k++) begin dbg_dout[k] = 32'hB000_0000 + 32'(k); dbg_count[k] = 9'(k + 50); end
  end
  // LUT model: registered read of the address bus, as in addr_lut
  always_ff @(posedge clk) lut_rdata <= {lut_ch[4:0], lut_addr[7:0], 1'b1};

  always @(posedge clk) begin
    for (int c = 0; c < N; c++) if (diag_pop[c]) begin n_diag_pop++; if (c != 17) begin failures++; $display("pop %0d", c); end end
    for (int k = 0; k < N_SCM; k++) if (dbg_pop[k]) begin n_dbg_pop++; if (k != 2) failures++; end
    if (diag_arm) n_arm++;
    if (lut_we) begin
      n_lut_we++;
      if (lut_ch != 5'd9 || lut_addr != 8'd200 || lut_wdata != 14'h2ABC) failures++;
    end
  end

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk) begin ecs_addr = a; ecs_wdata = d; ecs_wr = 1; end
    @(negedge clk) ecs_wr = 0;
  endtask
  task automatic rd(input logic [15:0] a, input logic [31:0] exp);
    @(negedge clk) begin ecs_addr = a; ecs_rd = 1; end
    @(negedge clk) ecs_rd = 0;
    checks++;
    if (ecs_rvalid) begin failures++; $display("rvalid too early"); end
    @(negedge clk);
    checks++;
    if (!ecs_rvalid || ecs_rdata !== exp) begin
      failures++; $display("read %h: %h exp %h (rvalid %b)", a, ecs_rdata, exp, ecs_rvalid);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    rd(16'h0000, {16'h5B00, 13'd0, ROLE_HCAL_MASTER});
    wr(16'h0001, 32'h0000_0ABC);
    rd(16'h0001, 32'h0000_0ABC);
    checks++; if (bcrst_delay != 12'hABC) failures++;
    wr(16'h0002, 32'h0000_0015);   // gen on, mode PRBS, comparator mode COUNT
    checks++; if (!gen_en || gen_mode != PAT_PRBS || chk_en || chk_mode != PAT_COUNT) failures++;
    rd(16'h0002, 32'h15);
    wr(16'h0003, 32'hCAFE_BABE);
    checks++; if (pattern != 32'hCAFE_BABE) failures++;
    rd(16'h0003, 32'hCAFE_BABE);
    wr(16'h0004, 32'h1);
    @(negedge clk);
    checks++; if (n_arm != 1 || diag_arm) failures++;
    rd(16'h0005, {16'd7, 9'd0, 1'b1, 6'd9});
    rd(16'h0006, 32'd1234);
    rd(16'h0007, 32'd3001);
    rd(16'h0105, {16'd105, 16'd6});
    rd(16'h0211, {16'd317, 16'd217});
    rd(16'h0302, 32'd1002);
    rd(16'h041B, 32'd2027);
    rd(16'h0500, 32'd3000);
    rd(16'h0A05, 32'd12);
    rd(16'h0611, 32'hD000_0011);
    rd(16'h0704, 32'd7);
    rd(16'h0802, 32'hB000_0002);
    rd(16'h0901, 32'd51);
    rd(16'h0140, 32'd0);           // channel out of range
    wr(16'h2000 | (16'd9 << 8) | 16'd200, 32'h0000_2ABC);
    rd(16'h2000 | (16'd9 << 8) | 16'd200, {18'd0, 5'd9, 8'd200, 1'b1});
    checks += 3;
    if (n_diag_pop != 1) failures++;
    if (n_dbg_pop != 1) failures++;
    if (n_lut_we != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
