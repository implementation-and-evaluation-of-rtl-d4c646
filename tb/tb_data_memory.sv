// Self-checking testbench for data_memory.
// A model here keeps its own array and queue of deferred master writes and
// applies the rules independently: processing-element write first, then
// master write, then the oldest queued write in a cycle without writes;
// a master write colliding with a processing-element write is queued, or
// lost when the queue holds three entries.  Directed cases: the collision of
// the interface test (master writes 24 and the PE writes 11 to word 3 in the
// same cycle; the PE value wins, 24 is written later), a full queue and a
// lost write.  Then random traffic on both ports, checking both read
// outputs every cycle and conflict_o / buffer_full_o.
module tb_data_memory;
  localparam int AW = 8;
  logic clk = 0, rst_n = 0;
  logic c_en = 0, c_we = 0, e_en = 0, e_we = 0;
  logic [AW-1:0] c_a = 0, e_a = 0;
  logic [31:0] c_d = 0, e_d = 0, c_q, e_q;
  logic conflict, full, lost;
  int checks = 0, failures = 0;
  int conflicts = 0, losts = 0, drains = 0;

  always #5 clk = ~clk;

  data_memory dut (
    .clk(clk), .rst_n(rst_n),
    .cgra_enable_i(c_en), .cgra_we_i(c_we), .cgra_address_i(c_a), .cgra_data_i(c_d), .cgra_data_o(c_q),
    .ecat_enable_i(e_en), .ecat_we_i(e_we), .ecat_address_i(e_a), .ecat_data_i(e_d), .ecat_data_o(e_q),
    .conflict_o(conflict), .buffer_full_o(full), .lost_o(lost));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // model
  logic [31:0] m [2**AW];
  logic [31:0] qd [$];
  logic [AW-1:0] qa [$];
  logic [31:0] exp_c, exp_e;
  logic exp_lost;

  // apply the inputs now on the pins for one clock and compare
  task automatic cycle();
    bit cw, ew, push, pop, fl;
    #1;
    cw = c_en && c_we;
    ew = e_en && e_we;
    fl = (qd.size() == 3);
    check("conflict flag", conflict, cw && ew);
    check("buffer full flag", full, fl);
    push = cw && ew && !fl;
    pop  = !cw && !ew && qd.size() > 0;
    exp_c = !c_en ? 0 : (c_we ? c_d : m[c_a]);
    exp_e = !e_en ? 0 : (e_we ? e_d : m[e_a]);
    exp_lost = cw && ew && fl;
    if (cw && ew) conflicts++;
    if (exp_lost) losts++;
    if (pop) drains++;
    if (cw) m[c_a] = c_d;
    else if (ew) m[e_a] = e_d;
    else if (pop) begin m[qa[0]] = qd[0]; void'(qa.pop_front()); void'(qd.pop_front()); end
    if (push) begin qa.push_back(e_a); qd.push_back(e_d); end
    @(negedge clk);
    check("PE read data", c_q, exp_c);
    check("master read data", e_q, exp_e);
    check("lost flag", lost, exp_lost);
  endtask

  task automatic idle();
    c_en = 0; c_we = 0; e_en = 0; e_we = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // fill the memory through the PE port
    for (int i = 0; i < 2**AW; i++) begin
      c_en = 1; c_we = 1; c_a = AW'(i); c_d = 32'(i * 7);
      cycle();
    end
    idle();
    // collision of the interface test: word 3, master 24, PE 11
    c_en = 1; c_we = 1; c_a = 3; c_d = 11;
    e_en = 1; e_we = 1; e_a = 3; e_d = 24;
    cycle();
    idle();
    c_en = 1; c_a = 3; cycle();                // PE sees its own value first
    check("PE wins the collision", c_q, 11);
    idle(); cycle();                           // queued master write drains
    e_en = 1; e_a = 3; cycle();
    check("queued master write lands later", e_q, 24);
    // fill the queue and lose one
    for (int i = 0; i < 4; i++) begin
      c_en = 1; c_we = 1; c_a = AW'(10 + i); c_d = 100 + i;
      e_en = 1; e_we = 1; e_a = AW'(20 + i); e_d = 200 + i;
      cycle();
    end
    idle();
    repeat (4) cycle();
    for (int i = 0; i < 3; i++) begin
      e_en = 1; e_a = AW'(20 + i); cycle();
      check("queued writes in order", e_q, 200 + i);
    end
    check("a write was lost", losts, 1);
    // random traffic
    for (int n = 0; n < 4000; n++) begin
      c_en = $urandom_range(0, 1); c_we = $urandom_range(0, 1);
      e_en = $urandom_range(0, 1); e_we = $urandom_range(0, 1);
      c_a = AW'($urandom_range(0, 15)); e_a = AW'($urandom_range(0, 15));
      c_d = $urandom; e_d = $urandom;
      cycle();
    end
    idle();
    repeat (5) cycle();
    for (int i = 0; i < 16; i++) begin e_en = 1; e_a = AW'(i); cycle(); end
    checks++;
    if (conflicts == 0 || drains == 0) begin failures++; $display("FAIL no conflict or drain seen"); end
    $display("conflicts=%0d lost=%0d drains=%0d", conflicts, losts, drains);
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
