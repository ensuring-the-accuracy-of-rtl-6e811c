// tb_control_unit: runs the control unit against simple models of its
// neighbours (a 3-cycle weight memory, source and destination activation
// memories with random delays, a PE array that finishes 46 cycles after start
// and an output buffer that offers 16 rows). For 3 layers of 2 tiles it checks
// that the weights of layer l are read from blocks 16l..16l+15 into rows 0..15,
// that every input block is read exactly once and in address order, that the
// results are written in address order, that the roles swap on start and
// after every layer, and that done pulses once at the end.
module tb_control_unit;
  localparam int BAW = 8, WAW = 8, LAYERS = 3, TILES = 2, L = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] num_layers = 8'(LAYERS);
  logic [BAW-5:0] num_tiles = (BAW-4)'(TILES);
  logic busy, done, src_sel;
  logic w_req, w_rvalid, rd_valid, rd_ready, rd_out_valid, rd_out_ready;
  logic wr_valid, wr_ready, a_we, w_we, pe_start, pe_done, ob_capture, ob_valid, ob_ready, ob_busy;
  logic [WAW-1:0] w_addr;
  logic [BAW-1:0] rd_addr, wr_addr;
  logic [3:0] a_row, w_row;
  int checks = 0, failures = 0;

  control_unit #(.BAW(BAW), .WAW(WAW)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  // weight memory model: fixed latency
  logic [L-1:0] wv;
  logic [WAW-1:0] wa [L];
  always @(posedge clk) begin
    wv <= {wv[L-2:0], w_req};
    wa[0] <= w_addr;
    for (int s = 1; s < L; s++) wa[s] <= wa[s-1];
  end
  assign w_rvalid = wv[L-1];

  // source memory model
  int src_state = 0, src_delay = 0;
  logic [BAW-1:0] last_rd;
  assign rd_ready = (src_state == 0) && rst_n;
  assign rd_out_valid = (src_state == 2);
  always @(posedge clk) begin
    if (src_state == 0 && rd_valid) begin src_state <= 1; src_delay <= $urandom_range(3, 8); last_rd <= rd_addr; end
    else if (src_state == 1) begin if (src_delay == 0) src_state <= 2; else src_delay <= src_delay - 1; end
    else if (src_state == 2 && rd_out_ready) src_state <= 0;
  end

  // PE array model
  int pe_cnt = -1;
  assign pe_done = (pe_cnt == 0);
  always @(posedge clk) begin
    if (pe_start) pe_cnt <= 46;
    else if (pe_cnt >= 0) pe_cnt <= pe_cnt - 1;
  end

  // output buffer model
  int ob_left = 0;
  assign ob_busy = (ob_left != 0);
  assign ob_valid = ob_busy;
  always @(posedge clk) begin
    if (ob_capture) ob_left <= 16;
    else if (ob_valid && ob_ready) ob_left <= ob_left - 1;
  end

  assign wr_ready = ($urandom_range(0, 2) != 0);

  // observers
  int exp_rd = 0, exp_wr = 0, layer_seen = 0, wcount = 0, arow_exp = 0, dones = 0, swaps = 0;
  logic sel_q;
  always @(posedge clk) if (rst_n) begin
    sel_q <= src_sel;
    if (sel_q != src_sel) swaps++;
    if (w_req) begin
      chk(w_addr == WAW'(16 * (wcount / 16) + (wcount % 16)), $sformatf("weight address %0d", w_addr));
      wcount++;
    end
    if (w_we) chk(w_row == 4'(wa[L-1] % 16) && (wa[L-1] / 16) == (wcount - 1) / 16, "weight row");
    if (rd_valid && rd_ready) begin
      chk(rd_addr == BAW'(exp_rd % (16 * TILES)), $sformatf("read address %0d", rd_addr));
      exp_rd++;
    end
    if (a_we) begin
      chk(a_row == 4'(arow_exp % 16) && rd_out_valid, "activation row");
      arow_exp++;
    end
    if (wr_valid && wr_ready) begin
      chk(wr_addr == BAW'(exp_wr % (16 * TILES)), $sformatf("write address %0d", wr_addr));
      exp_wr++;
    end
    if (done) dones++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(src_sel == 1 && !busy, "memory 0 is the output buffer after reset");
    start = 1;
    @(negedge clk);
    start = 0;
    chk(busy && src_sel == 0, "start swaps the roles");
    while (!done) @(negedge clk);
    @(negedge clk);
    chk(!busy, "idle after done");
    chk(dones == 1, "one done pulse");
    chk(exp_rd == 16 * TILES * LAYERS, $sformatf("blocks read %0d", exp_rd));
    chk(exp_wr == 16 * TILES * LAYERS, $sformatf("blocks written %0d", exp_wr));
    chk(wcount == 16 * LAYERS, "weight blocks read");
    chk(swaps == 1 + LAYERS, $sformatf("role swaps %0d", swaps));
    chk(src_sel == 1'((1 + LAYERS) % 2 == 0 ? 1 : 0), "last result memory is the input buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
