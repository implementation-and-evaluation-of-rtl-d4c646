// Self-checking testbench for cgra_interface with its default parameters
// (three PEs, 32-bit words, 8-bit PE addresses, configuration memory up to
// offset 255, slave ID 0).
//
// Part 1 replays the access sequence of the interface test: the master reads
// offset 257, writes 24 to offset 257, then writes 24 to offset 258 in the
// same cycle as PE 0 writes 11 to its word 3 (a collision; the PE value
// stays visible first and the master value lands one free cycle later), both
// sides read concurrently, and the master writes to address 0x00010104,
// which must reach word 5 of PE 1.  Part 2 runs random traffic from the
// master (configuration memory, all PEs, out-of-range PEs, offsets and slave
// IDs) and from all three PEs against a model holding every memory and a
// deferred-write queue per PE, checking every read output every cycle.
module tb_cgra_interface;
  localparam int NPE = 3;
  localparam int W = 32;
  localparam int AW = 8;
  localparam int CMAX = 255;

  logic clk = 0, rst_n = 0;
  logic e_en = 0, e_we = 0;
  logic [31:0] e_a = 0, e_d = 0, e_q;
  logic [NPE-1:0] c_en = 0, c_we = 0;
  logic [NPE*AW-1:0] c_a = 0;
  logic [NPE*W-1:0] c_d = 0, c_q;
  logic [NPE-1:0] conflict, full, lost;
  int checks = 0, failures = 0, conflicts = 0;

  always #5 clk = ~clk;

  cgra_interface dut (
    .clk(clk), .rst_n(rst_n),
    .ecat_enable_i(e_en), .ecat_we_i(e_we), .ecat_address_i(e_a), .ecat_data_i(e_d), .ecat_data_o(e_q),
    .cgra_enable_i(c_en), .cgra_we_i(c_we), .cgra_address_i(c_a), .cgra_data_i(c_d), .cgra_data_o(c_q),
    .conflict_o(conflict), .buffer_full_o(full), .lost_o(lost));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  logic [31:0] cfg [CMAX+1];
  logic [31:0] m [NPE][2**AW];
  logic [31:0] qd [NPE][$];
  logic [AW-1:0] qa [NPE][$];

  function automatic logic [31:0] addr(input int slave, input int pe, input int off);
    return {8'(slave), 8'(pe), 16'(off)};
  endfunction

  // one clock with the current inputs, model update and output comparison
  task automatic cycle();
    logic [31:0] exp_e, exp_c [NPE];
    bit hit, cfg_sel, sel [NPE];
    int off, doff;
    #1;
    hit = (e_a[31:24] == 0);
    off = int'(e_a[15:0]);
    doff = off - CMAX;
    cfg_sel = e_en && hit && off <= CMAX;
    exp_e = '0;
    if (cfg_sel) exp_e = e_we ? e_d : cfg[off];
    for (int i = 0; i < NPE; i++) begin
      sel[i] = e_en && hit && off > CMAX && doff < 2**AW && int'(e_a[23:16]) == i;
      if (sel[i]) exp_e |= e_we ? e_d : m[i][doff];
      exp_c[i] = !c_en[i] ? 0 : (c_we[i] ? c_d[i*W +: W] : m[i][c_a[i*AW +: AW]]);
    end
    if (cfg_sel && e_we) cfg[off] = e_d;
    for (int i = 0; i < NPE; i++) begin
      bit cw, ew, fl;
      cw = c_en[i] && c_we[i];
      ew = sel[i] && e_we;
      fl = qd[i].size() == 3;
      check("conflict flag", conflict[i], cw && ew);
      if (cw && ew) conflicts++;
      if (cw) m[i][c_a[i*AW +: AW]] = c_d[i*W +: W];
      else if (ew) m[i][doff] = e_d;
      else if (qd[i].size() > 0) begin
        m[i][qa[i][0]] = qd[i][0];
        void'(qa[i].pop_front()); void'(qd[i].pop_front());
      end
      if (cw && ew && !fl) begin qa[i].push_back(AW'(doff)); qd[i].push_back(e_d); end
    end
    @(negedge clk);
    check("master read data", e_q, exp_e);
    for (int i = 0; i < NPE; i++) check("PE read data", c_q[i*W +: W], exp_c[i]);
  endtask

  task automatic idle();
    e_en = 0; e_we = 0; c_en = '0; c_we = '0;
  endtask

  task automatic ecat(input logic we, input logic [31:0] a, input logic [31:0] d);
    e_en = 1; e_we = we; e_a = a; e_d = d;
  endtask

  task automatic pe(input int i, input logic we, input int a, input logic [31:0] d);
    c_en[i] = 1; c_we[i] = we; c_a[i*AW +: AW] = AW'(a); c_d[i*W +: W] = d;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // initial contents: configuration through the master, data through the PEs
    for (int k = 0; k < 2**AW; k++) begin
      ecat(1, addr(0, 0, k), 32'hC000_0000 + k);
      for (int i = 0; i < NPE; i++) pe(i, 1, k, 32'h1000_0000 * (i + 1) + k);
      cycle();
    end
    idle();

    // part 1: the interface test sequence
    ecat(0, 257, 0); cycle();
    check("read offset 257 is PE0 word 2", e_q, 32'h1000_0002);
    ecat(1, 257, 24); cycle(); idle();
    pe(0, 0, 2, 0); cycle();
    check("PE0 sees master write at word 2", c_q[0 +: W], 24);
    ecat(1, 258, 24); pe(0, 1, 3, 11); cycle();
    check("collision raised", conflicts, 1);
    idle();
    ecat(0, 258, 0); pe(0, 0, 3, 0); cycle();   // drains during this cycle
    check("PE value first (master)", e_q, 11);
    check("PE value first (PE)", c_q[0 +: W], 11);
    ecat(0, 258, 0); pe(0, 0, 3, 0); cycle();
    check("queued master value afterwards", e_q, 24);
    idle();
    ecat(1, 32'd65796, 32'h5A5A); cycle(); idle();
    pe(1, 0, 5, 0); cycle();
    check("address 65796 is PE1 word 5", c_q[W +: W], 32'h5A5A);
    ecat(0, addr(0, 0, 7), 0); cycle();
    check("configuration memory read", e_q, 32'hC000_0007);
    ecat(0, addr(1, 0, 300), 0); cycle();
    check("other slave ID ignored", e_q, 0);
    idle();

    // part 2: random traffic
    for (int n = 0; n < 6000; n++) begin
      int r, off;
      r = $urandom_range(0, 9);
      off = (r < 2) ? $urandom_range(0, 20) : (r < 9) ? $urandom_range(256, 270) : $urandom_range(500, 520);
      e_en = $urandom_range(0, 3) != 0;
      e_we = $urandom_range(0, 1);
      e_a = addr(($urandom_range(0, 15) == 0) ? 1 : 0, $urandom_range(0, 3), off);
      e_d = $urandom;
      for (int i = 0; i < NPE; i++)
        if ($urandom_range(0, 2) != 0) pe(i, $urandom_range(0, 1), $urandom_range(0, 15), $urandom);
        else begin c_en[i] = 0; c_we[i] = 0; end
      cycle();
    end
    idle();
    repeat (5) cycle();
    for (int i = 0; i < NPE; i++)
      for (int k = 0; k < 16; k++) begin pe(i, 0, k, 0); cycle(); end
    $display("conflicts=%0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
