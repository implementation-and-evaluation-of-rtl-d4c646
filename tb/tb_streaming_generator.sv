// Self-checking testbench for streaming_generator.
// A reference model written here processes each frame as a whole byte
// array: it walks the datagrams, serves commands 5..9 against its own copy
// of the 32-byte register file, adds the working-counter increments and, for
// the last node, exchanges the MAC addresses.  The device sees the same
// frames as a byte stream at line rate (one byte every two cycles) and its
// output stream must match the model byte for byte, on the right port.
// Frames: the three-datagram frame of the bring-up test (BWR of five bytes,
// BRW of one byte reading back what the first wrote, BWR of two bytes),
// random EtherCAT frames with served, unserved and wrongly addressed
// datagrams at arbitrary byte alignment, and non-EtherCAT frames.  Both
// chain positions are tested, and frames returning on port 1 must reach
// port 0 unchanged.  The latency from the input of byte 6 to the output of
// byte 0 is checked to be the six-byte delay (13 cycles).
module tb_streaming_generator;
  logic clk = 0, rst_n = 0;
  logic is_last = 1;
  logic rx0_valid = 0, rx0_sof = 0, rx0_last = 0;
  logic [7:0] rx0_data = 0;
  logic rx1_valid = 0, rx1_last = 0;
  logic [7:0] rx1_data = 0;
  logic tx0_valid, tx0_last, tx1_valid, tx1_last, ecat_frame, dgram_served;
  logic [7:0] tx0_data, tx1_data;
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  streaming_generator dut (
    .clk(clk), .rst_n(rst_n), .is_last_i(is_last),
    .rx0_valid_i(rx0_valid), .rx0_data_i(rx0_data), .rx0_sof_i(rx0_sof), .rx0_last_i(rx0_last),
    .rx1_valid_i(rx1_valid), .rx1_data_i(rx1_data), .rx1_last_i(rx1_last),
    .tx0_valid_o(tx0_valid), .tx0_data_o(tx0_data), .tx0_last_o(tx0_last),
    .tx1_valid_o(tx1_valid), .tx1_data_o(tx1_data), .tx1_last_o(tx1_last),
    .ecat_frame_o(ecat_frame), .dgram_served_o(dgram_served));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------- reference
  logic [7:0] mregs [32];
  int served_model = 0;

  function automatic void model(input logic [7:0] fin [$], input logic last,
                                output logic [7:0] fout [$]);
    int n, p;
    fout = fin;
    n = fin.size();
    if (n >= 16 && fin[12] == 8'h88 && fin[13] == 8'hA4) begin
      p = 16;
      while (p + 10 <= n) begin
        int cmd, adp, ado, len, inc;
        bit rd, wr, hit;
        cmd = fin[p];
        adp = fin[p+2] | (fin[p+3] << 8);
        ado = fin[p+4] | (fin[p+5] << 8);
        len = (fin[p+6] | (fin[p+7] << 8)) & 16'h07FF;
        rd = 0; wr = 0; inc = 0; hit = 0;
        case (cmd)
          5: begin wr = 1; inc = 1; hit = (adp == 0); end
          6: begin rd = 1; wr = 1; inc = 3; hit = (adp == 0); end
          7: begin rd = 1; inc = 1; hit = 1; end
          8: begin wr = 1; inc = 1; hit = 1; end
          9: begin rd = 1; wr = 1; inc = 3; hit = 1; end
          default: ;
        endcase
        for (int k = 0; k < len && p + 10 + k < n; k++) begin
          int a;
          a = (ado + k) % 32;
          if (hit && rd) fout[p + 10 + k] = mregs[a];
          if (hit && wr) mregs[a] = fin[p + 10 + k];
        end
        if (p + 10 + len < n) begin
          int w;
          w = fin[p + 10 + len];
          if (p + 11 + len < n) w |= fin[p + 11 + len] << 8;
          if (hit) w += inc;
          fout[p + 10 + len] = w[7:0];
          if (p + 11 + len < n) fout[p + 11 + len] = w[15:8];
          if (hit) served_model++;
        end
        p += 12 + len;
      end
    end
    if (last && n >= 12)
      for (int i = 0; i < 6; i++) begin
        fout[i] = fin[i + 6];
        fout[i + 6] = fin[i];
      end
  endfunction

  // ---------------------------------------------------------- monitors
  logic [7:0] out0 [$], out1 [$];
  int last0 = 0, last1 = 0, served_seen = 0, ecat_seen = 0;
  longint cyc = 0, t_in6 = 0, t_out0 = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (tx0_valid) begin
        if (out0.size() == 0) t_out0 = cyc;
        out0.push_back(tx0_data);
        if (tx0_last) last0++;
      end
      if (tx1_valid) begin
        if (out1.size() == 0) t_out0 = cyc;
        out1.push_back(tx1_data);
        if (tx1_last) last1++;
      end
      if (dgram_served) served_seen++;
      if (ecat_frame) ecat_seen++;
    end
  end

  task automatic send(input logic [7:0] f [$], input bit port1);
    for (int i = 0; i < f.size(); i++) begin
      @(negedge clk);
      if (port1) begin
        rx1_valid = 1; rx1_data = f[i]; rx1_last = (i == f.size() - 1);
      end else begin
        rx0_valid = 1; rx0_data = f[i]; rx0_sof = (i == 0); rx0_last = (i == f.size() - 1);
        if (i == 6) t_in6 = cyc;
      end
      @(negedge clk);
      rx0_valid = 0; rx0_sof = 0; rx0_last = 0;
      rx1_valid = 0; rx1_last = 0;
    end
    repeat (30) @(negedge clk);
  endtask

  task automatic run_frame(input logic [7:0] f [$], input bit last, input string what);
    logic [7:0] exp [$];
    bit bad;
    out0.delete(); out1.delete(); last0 = 0; last1 = 0;
    is_last = last;
    model(f, last, exp);
    send(f, 0);
    checks++;
    bad = 0;
    if (last) begin
      if (out0.size() != exp.size() || out1.size() != 0 || last0 != 1) bad = 1;
      else foreach (exp[i]) if (out0[i] !== exp[i]) bad = 1;
    end else begin
      if (out1.size() != exp.size() || out0.size() != 0 || last1 != 1) bad = 1;
      else foreach (exp[i]) if (out1[i] !== exp[i]) bad = 1;
    end
    if (bad) begin
      failures++;
      $display("FAIL %s (last=%0d): sizes %0d/%0d expected %0d", what, last,
               out0.size(), out1.size(), exp.size());
    end
    checks++;
    if (t_out0 - t_in6 != 2) begin
      failures++;
      $display("FAIL %s: latency byte6 in to byte0 out %0d cycles", what, t_out0 - t_in6);
    end
  endtask

  function automatic void rand_frame(output logic [7:0] f [$], input bit ecat);
    int target;
    target = $urandom_range(60, 300);
    f.delete();
    for (int i = 0; i < 12; i++) f.push_back(8'($urandom));
    f.push_back(ecat ? 8'h88 : 8'h08);
    f.push_back(ecat ? 8'hA4 : 8'h00);
    f.push_back(8'($urandom)); f.push_back(8'h10);
    while (f.size() < target) begin
      int cmds [8] = '{5, 6, 7, 8, 9, 1, 4, 12};
      int len;
      int adp;
      len = $urandom_range(0, 12);
      adp = ($urandom_range(0, 3) == 0) ? 1 : 0;
      f.push_back(8'(cmds[$urandom_range(0, 7)]));
      f.push_back(8'($urandom));
      f.push_back(8'(adp)); f.push_back(8'h00);
      f.push_back(8'($urandom)); f.push_back(8'($urandom_range(0, 3)));
      f.push_back(8'(len)); f.push_back(8'($urandom_range(0, 1) << 7));
      f.push_back(8'h00); f.push_back(8'h00);
      for (int k = 0; k < len; k++) f.push_back(8'($urandom));
      f.push_back(8'($urandom_range(250, 255))); f.push_back(8'($urandom_range(0, 2)));
    end
  endfunction

  // broadcast read of the whole register file, looped back on port 0
  task automatic read_all_regs(output logic [7:0] f [$]);
    f.delete();
    for (int i = 0; i < 12; i++) f.push_back(8'h02);
    f.push_back(8'h88); f.push_back(8'hA4); f.push_back(8'h2C); f.push_back(8'h10);
    f.push_back(8'd7); f.push_back(8'h00);            // BRD
    f.push_back(8'h00); f.push_back(8'h00);           // slave address
    f.push_back(8'h00); f.push_back(8'h00);           // offset 0
    f.push_back(8'd32); f.push_back(8'h00);           // 32 bytes
    f.push_back(8'h00); f.push_back(8'h00);
    for (int i = 0; i < 32; i++) f.push_back(8'h00);
    f.push_back(8'h00); f.push_back(8'h00);
    run_frame(f, 1, "register read-back frame");
  endtask

  initial begin
    logic [7:0] f [$];
    logic [7:0] bringup [$] = '{
      8'hff, 8'hff, 8'hff, 8'hff, 8'hff, 8'hff, 8'h01, 8'h01, 8'h01, 8'h01, 8'h01, 8'h01,
      8'h88, 8'ha4, 8'h2b, 8'h10,
      8'h08, 8'h01, 8'h00, 8'h00, 8'h00, 8'h00, 8'h05, 8'h00, 8'h00, 8'h00,
      8'ha5, 8'ha5, 8'ha5, 8'ha5, 8'ha5, 8'h00, 8'h00,
      8'h09, 8'h01, 8'h00, 8'h00, 8'h00, 8'h01, 8'h01, 8'h00, 8'h00, 8'h00,
      8'h00, 8'h00, 8'h00,
      8'h08, 8'h01, 8'h00, 8'h00, 8'h00, 8'h01, 8'h02, 8'h80, 8'h00, 8'h00,
      8'h00, 8'h00, 8'h00, 8'h00};
    foreach (mregs[i]) mregs[i] = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);

    // bring-up frame, last node: known answers written out by hand
    run_frame(bringup, 1, "bring-up frame");
    check("dst after swap", {out0[0], out0[5]}, 16'h0101);
    check("src after swap", {out0[6], out0[11]}, 16'hffff);
    check("BWR wkc", {out0[32], out0[31]}, 16'h0001);
    check("BRW read back", out0[43], 8'ha5);
    check("BRW wkc", {out0[45], out0[44]}, 16'h0003);
    check("second BWR wkc", {out0[59], out0[58]}, 16'h0001);
    check("datagrams served", served_seen, 3);
    read_all_regs(f);
    check("register 0 rewritten", out0[26], 8'h00);
    check("register 4 kept", out0[30], 8'ha5);

    // random EtherCAT and other frames, both chain positions
    for (int n = 0; n < 60; n++) begin
      bit ecat;
      ecat = ($urandom_range(0, 4) != 0);
      rand_frame(f, ecat);
      run_frame(f, 1'($urandom_range(0, 1)), ecat ? "random EtherCAT frame" : "other frame");
    end
    read_all_regs(f);
    for (int i = 0; i < 32; i++) check("register file", 32'(out0[26 + i]), 32'(mregs[i]));
    check("served datagram count", served_seen, served_model);

    // frames coming back from the next node pass to port 0 untouched
    is_last = 0;
    rand_frame(f, 1);
    out0.delete(); out1.delete(); last0 = 0;
    send(f, 1);
    checks++;
    if (out0 != f || out1.size() != 0 || last0 != 1) begin
      failures++; $display("FAIL return path");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
