// tb_mpc_cfg_regs: self-checking test of the AXI4-Lite coefficient bank (N = 3).
//
// A simple AXI4-Lite master writes every coefficient word (address before
// data, data before address, or both together, with random response
// back-pressure), reads them back, and checks that:
//   * the active matrices do not change before a commit, nor while `safe` is
//     low with a commit pending; the CTRL register shows the pending request;
//   * after the commit every matrix element equals the word at its place in
//     the documented word map;
//   * byte strobes update only the selected bytes;
//   * the enable bit and the three status words read back as driven.
module tb_mpc_cfg_regs;
  import mpc_pkg::*;

  localparam int N = 3;
  localparam int L = 3 * N;
  localparam int M = 2 * N;
  localparam int NC = n_coef(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0] s_awaddr, s_araddr;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0] s_wstrb;
  logic [1:0] s_bresp, s_rresp;
  logic safe, ctrl_enable, committed;
  logic [31:0] status_word, exec_word, overrun_word;
  data_t a_mat [N_X][N_X];
  data_t b_mat [N_X][N_PH];
  data_t gamma [M][N_X];
  data_t upsilon [M][L];
  data_t hinv [L][L];
  data_t v_mat [L][L];
  data_t lambda_u;

  mpc_cfg_regs #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic axi_write(input int word, input logic [31:0] data, input logic [3:0] strb,
                           input int order);
    bit aw_acc, w_acc, aw_done, w_done;
    s_awaddr = 12'(word * 4); s_wdata = data; s_wstrb = strb;
    aw_done = 0; w_done = 0;
    if (order != 1) s_awvalid = 1;
    if (order != 0) s_wvalid = 1;
    while (!(aw_done && w_done)) begin
      @(negedge clk);
      aw_acc = s_awvalid && s_awready;
      w_acc  = s_wvalid && s_wready;
      @(posedge clk); #1;
      if (aw_acc) begin s_awvalid = 0; aw_done = 1; end
      if (w_acc)  begin s_wvalid = 0;  w_done = 1;  end
      if (order == 0 && aw_done && !w_done) s_wvalid = 1;
      if (order == 1 && w_done && !aw_done) s_awvalid = 1;
    end
    while (!s_bvalid) begin @(posedge clk); #1; end
    repeat ($urandom_range(0, 2)) begin
      @(posedge clk); #1;
      check(s_bvalid, "bvalid held under back-pressure");
    end
    s_bready = 1;
    @(posedge clk); #1;
    s_bready = 0;
  endtask

  task automatic axi_read(input int word, output logic [31:0] data);
    s_araddr = 12'(word * 4); s_arvalid = 1;
    @(posedge clk); #1;
    s_arvalid = 0;
    while (!s_rvalid) begin @(posedge clk); #1; end
    data = s_rdata;
    s_rready = 1;
    @(posedge clk); #1;
    s_rready = 0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] img [NC];
    logic [31:0] rd;
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0; s_wstrb = 0;
    safe = 0; status_word = 32'h0003_0051; exec_word = 32'h00A0_0033; overrun_word = 7;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < NC; i++) begin
      img[i] = $urandom;
      axi_write(i, img[i], 4'hF, i % 3);
    end
    for (int i = 0; i < NC; i += 7) begin
      axi_read(i, rd);
      check(rd == img[i], $sformatf("readback word %0d", i));
    end
    check(a_mat[0][0] == 0 && lambda_u == 0, "active bank unchanged before commit");
    // byte strobes
    axi_write(5, 32'hA1B2C3D4, 4'b0101, 2);
    img[5] = {img[5][31:24], 8'hB2, img[5][15:8], 8'hD4};
    axi_read(5, rd);
    check(rd == img[5], "byte strobes");
    // commit request while the controller is busy
    axi_write(1020, 32'h3, 4'hF, 2);
    axi_read(1020, rd);
    check(rd[1:0] == 2'b11, "commit pending and enable set");
    repeat (10) @(posedge clk);
    #1 check(v_mat[1][0] == 0 && !committed, "no commit while not safe");
    check(ctrl_enable, "enable output");
    @(negedge clk) safe = 1;
    @(posedge clk); #1;
    check(committed, "commit pulse");
    safe = 0;
    axi_read(1020, rd);
    check(rd[1:0] == 2'b10, "commit no longer pending");
    for (int r = 0; r < N_X; r++) begin
      for (int c = 0; c < N_X; c++)  check(a_mat[r][c] == img[OFF_A + r*N_X + c], "A map");
      for (int c = 0; c < N_PH; c++) check(b_mat[r][c] == img[OFF_B + r*N_PH + c], "B map");
    end
    for (int r = 0; r < M; r++) begin
      for (int c = 0; c < N_X; c++) check(gamma[r][c] == img[OFF_GAMMA + r*N_X + c], "Gamma map");
      for (int c = 0; c < L; c++) check(upsilon[r][c] == img[off_ups(N) + r*L + c], "Upsilon map");
    end
    for (int r = 0; r < L; r++) for (int c = 0; c < L; c++) begin
      check(hinv[r][c] == img[off_hinv(N) + r*L + c], "Hinv map");
      check(v_mat[r][c] == img[off_v(N) + r*L + c], "V map");
    end
    check(lambda_u == img[off_lambda(N)], "lambda map");
    // a later write reaches the shadow bank only
    axi_write(off_lambda(N), 32'h1234, 4'hF, 0);
    repeat (2) @(posedge clk);
    #1 check(lambda_u == img[off_lambda(N)], "shadow write does not reach active bank");
    axi_read(1021, rd); check(rd == status_word, "status word");
    axi_read(1022, rd); check(rd == exec_word, "exec word");
    axi_read(1023, rd); check(rd == overrun_word, "overrun word");
    axi_read(900, rd);  check(rd == 0, "unmapped word reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
