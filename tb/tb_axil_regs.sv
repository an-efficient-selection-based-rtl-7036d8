// tb_axil_regs: unit testbench for the AXI4-Lite register interface.
//
// K = 3, NT = 30. The classifier side is replaced by a model: a word sink
// whose s_ready is held low for random stretches (and for long stretches in
// one test, as when the core is busy), and status and result signals driven
// by the testbench. Checked: every word written to TRAIN_DATA/QUERY_DATA
// reaches the sink once, in order, with the right query flag, and a write
// is held off (awready low) while a word is still pending; CTRL pulses
// train_clear and fetch_start for exactly one clock and keeps early_out as
// a level; FETCH_BASE honours the byte strobes and a CTRL write with strobe
// byte 0 clear is ignored; STATUS shows busy/train_full/fetch_busy/pending;
// a result pulse is captured into RESULT, CYCLES, VOTES, NN[] and raises
// irq, which stays high until RESULT is read; FETCH_INFO and an unmapped
// address. Responses are taken with random back-pressure.
module tb_axil_regs;
  import knn_pkg::*;

  localparam int K = 3, NT = 30, IW = $clog2(NT + 1), CW = $clog2(K + 1);
  localparam int WATCHDOG = 100000;
  localparam logic [7:0] A_TRAIN = 8'h00, A_QUERY = 8'h04, A_CTRL = 8'h08,
                         A_BASE  = 8'h0C, A_STAT  = 8'h10, A_RES  = 8'h14,
                         A_CYC   = 8'h18, A_FINFO = 8'h1C, A_VOTE = 8'h20,
                         A_NN    = 8'h40;

  logic clk = 0, rst_n = 0;
  logic s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready, s_axi_bvalid, s_axi_bready;
  logic s_axi_arvalid, s_axi_arready, s_axi_rvalid, s_axi_rready;
  logic [7:0] s_axi_awaddr, s_axi_araddr;
  logic [31:0] s_axi_wdata, s_axi_rdata;
  logic [3:0] s_axi_wstrb;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic s_valid, s_ready, s_query, train_clear, early_out, fetch_start, irq;
  feat_t s_data;
  logic [31:0] fetch_base;
  logic busy, train_full, fetch_busy, res_valid, res_aborted;
  logic [15:0] fetch_bursts;
  logic [7:0] fetch_errors;
  logic [CLS_W-1:0] res_class;
  dm_entry_t [K-1:0] res_nn;
  logic [31:0] res_cycles;
  logic [N_CLASS-1:0][CW-1:0] res_counts;
  logic [IW-1:0] res_v2_inserts;

  axil_regs #(.K(K), .NT(NT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_stall = 0, n_clear = 0, n_fstart = 0;
  bit sink_block = 0;
  logic [24:0] sent [$];

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("tb_axil_regs: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("tb_axil_regs: %s", msg); end
  endtask

  // word sink: random ready, compares against the words written
  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) begin
      logic [24:0] e;
      checks++;
      if (sent.size() == 0) begin failures++; $display("tb_axil_regs: unexpected word %h", s_data); end
      else begin
        e = sent.pop_front();
        if ({s_query, s_data} !== e) begin failures++; $display("tb_axil_regs: word %h/%b exp %h", s_data, s_query, e); end
      end
    end
    if (s_axi_awvalid && s_axi_wvalid && !s_axi_awready) n_stall++;
    if (train_clear) n_clear++;
    if (fetch_start) n_fstart++;
    #1 s_ready = !sink_block && ($urandom_range(0, 2) != 0);
  end

  task automatic axi_write(logic [7:0] addr, logic [31:0] data, logic [3:0] strb = 4'hF);
    s_axi_awvalid = 1; s_axi_awaddr = addr;
    repeat ($urandom_range(0, 2)) begin @(posedge clk); #1; end
    s_axi_wvalid = 1; s_axi_wdata = data; s_axi_wstrb = strb;
    @(posedge clk);
    while (!s_axi_awready) @(posedge clk);
    #1;
    s_axi_awvalid = 0; s_axi_wvalid = 0;
    repeat ($urandom_range(0, 2)) begin
      check(s_axi_awready == 0, "write accepted while the response is pending");
      @(posedge clk); #1;
    end
    s_axi_bready = 1;
    while (!s_axi_bvalid) begin @(posedge clk); #1; end
    check(s_axi_bresp == 2'b00, "write response not OKAY");
    @(posedge clk); #1;
    s_axi_bready = 0;
  endtask

  task automatic axi_read(logic [7:0] addr, output logic [31:0] data);
    s_axi_arvalid = 1; s_axi_araddr = addr;
    @(posedge clk);
    while (!s_axi_arready) @(posedge clk);
    #1;
    s_axi_arvalid = 0;
    repeat ($urandom_range(0, 2)) begin @(posedge clk); #1; end
    s_axi_rready = 1;
    while (!s_axi_rvalid) begin @(posedge clk); #1; end
    data = s_axi_rdata;
    check(s_axi_rresp == 2'b00, "read response not OKAY");
    @(posedge clk); #1;
    s_axi_rready = 0;
  endtask

  task automatic push(bit q, feat_t d);
    sent.push_back({q, d});
    axi_write(q ? A_QUERY : A_TRAIN, {~8'h00, d});   // upper byte must be ignored
  endtask

  initial begin
    logic [31:0] v;
    int c0;
    s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_bready = 0; s_axi_arvalid = 0; s_axi_rready = 0;
    s_axi_awaddr = '0; s_axi_araddr = '0; s_axi_wdata = '0; s_axi_wstrb = '0;
    s_ready = 0; busy = 0; train_full = 0; fetch_busy = 0; fetch_bursts = '0; fetch_errors = '0;
    res_valid = 0; res_aborted = 0; res_class = '0; res_nn = '0; res_cycles = '0; res_counts = '0; res_v2_inserts = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;
    axi_read(A_STAT, v);
    check(v == 0 && !irq, $sformatf("state after reset %h", v));

    // data words, random sink
    for (int i = 0; i < 60; i++) push($urandom_range(0, 1), feat_t'($urandom));
    // sink blocked: the first word waits, the second write is held off
    sink_block = 1;
    push(1, feat_t'(24'h123456));
    axi_read(A_STAT, v);
    check(v[4] == 1'b1, "STATUS.pending not set while a word waits");
    fork
      push(1, feat_t'(24'h654321));
      begin repeat (40) @(posedge clk); #1; sink_block = 0; end
    join
    repeat (10) @(posedge clk); #1;
    check(sent.size() == 0, $sformatf("%0d words never reached the sink", sent.size()));
    check(n_stall >= 30, $sformatf("write held off only %0d clocks", n_stall));

    // CTRL
    axi_write(A_CTRL, 32'h7);
    @(posedge clk); #1;
    check(n_clear == 1 && n_fstart == 1 && early_out, $sformatf("CTRL: clear %0d, fetch %0d, early_out %b", n_clear, n_fstart, early_out));
    axi_write(A_CTRL, 32'h0, 4'b1110);
    check(early_out, "CTRL write without byte-0 strobe changed early_out");
    axi_read(A_CTRL, v);
    check(v == 32'h2, $sformatf("CTRL reads %h", v));
    axi_write(A_CTRL, 32'h0);
    check(!early_out && n_clear == 1 && n_fstart == 1, "CTRL: early_out not cleared or a pulse repeated");

    // FETCH_BASE byte strobes
    axi_write(A_BASE, 32'hA1B2C3D4);
    axi_write(A_BASE, 32'h55667788, 4'b0101);
    axi_read(A_BASE, v);
    check(v == 32'hA166C388 && fetch_base == v, $sformatf("FETCH_BASE %h", v));

    // status and fetch info
    busy = 1; train_full = 1; fetch_busy = 1; fetch_bursts = 16'd714; fetch_errors = 8'd3;
    axi_read(A_STAT, v);
    check(v == 32'hE, $sformatf("STATUS %h exp e", v));
    axi_read(A_FINFO, v);
    check(v == {8'd0, 8'd3, 16'd714}, $sformatf("FETCH_INFO %h", v));
    busy = 0; fetch_busy = 0;

    // results: capture, irq, clear on read
    for (int r = 0; r < 6; r++) begin
      logic [CLS_W-1:0] cls;
      dm_entry_t [K-1:0] nn;
      logic [31:0] cyc;
      logic [IW-1:0] v2;
      logic ab;
      cls = CLS_W'($urandom); cyc = $urandom; v2 = IW'($urandom_range(0, NT)); ab = $urandom_range(0, 1);
      for (int p = 0; p < K; p++) nn[p] = {dist_t'($urandom), CLS_W'($urandom)};
      c0 = $urandom_range(0, K);
      @(posedge clk); #1;
      res_valid = 1; res_class = cls; res_nn = nn; res_cycles = cyc; res_v2_inserts = v2; res_aborted = ab;
      res_counts[0] = CW'(c0); res_counts[1] = CW'(K - c0);
      @(posedge clk); #1;
      res_valid = 0; res_nn = '0; res_cycles = '0;   // registers must hold the captured values
      @(posedge clk); #1;
      check(irq, "irq not raised by a result");
      axi_read(A_CYC, v);
      check(v == cyc, $sformatf("CYCLES %h exp %h", v, cyc));
      axi_read(A_VOTE, v);
      check(v == {16'd0, 8'(K - c0), 8'(c0)}, $sformatf("VOTES %h", v));
      for (int p = 0; p < K; p++) begin
        axi_read(A_NN + 8'(4 * p), v);
        check(v == {8'(nn[p].cls), nn[p].distance}, $sformatf("NN[%0d] %h", p, v));
      end
      check(irq, "irq dropped before RESULT was read");
      axi_read(A_RES, v);
      check(v == {16'(v2), 7'd0, ab, 8'(cls)}, $sformatf("RESULT %h", v));
      check(!irq, "irq still high after RESULT was read");
      axi_read(A_STAT, v);
      check(v[0] == 1'b0, "STATUS.ready still set");
    end
    axi_read(8'h3C, v);
    check(v == 0, "unmapped address not zero");
    axi_write(8'h30, 32'hFFFF_FFFF);
    axi_read(A_BASE, v);
    check(v == 32'hA166C388, "write to an unmapped address changed FETCH_BASE");

    $display("write stall clocks %0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
