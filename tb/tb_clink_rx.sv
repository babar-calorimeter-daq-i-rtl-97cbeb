// tb_clink_rx: sends a stream of C-LINK packets, mostly back-to-back with the
// single separating zero, and checks that exactly the expected strobes and
// register requests come out, each in the cycle after the last header bit,
// with the right target, CARE number and header. Write requests are followed
// by random data bits while hold is asserted, as the register engine does;
// no false start bit may be found in them.
module tb_clink_rx;
  import iob_pkg::*;
  logic clk = 0, rst_n = 0, clink = 0, hold = 0;
  logic sync_s, l1a_s, cal_s, req_valid;
  fc_req_t req;
  logic [9:0] header;
  int checks = 0, failures = 0;
  int cyc = 0;

  typedef struct { int kind; int cycle; fc_req_t req; } ev_t; // kind 1 sync 2 l1a 3 cal 4 req
  ev_t exp_q[$], got_q[$];

  clink_rx dut (.clk, .rst_n, .clink_i(clink), .hold_i(hold), .sync_o(sync_s),
    .l1a_o(l1a_s), .cal_o(cal_s), .req_valid_o(req_valid), .req_o(req), .header_o(header));

  always #8 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // monitor
  always @(negedge clk) if (rst_n) begin
    ev_t e;
    e.cycle = cyc; e.req = req;
    if (sync_s)    begin e.kind = 1; got_q.push_back(e); end
    if (l1a_s)     begin e.kind = 2; got_q.push_back(e); end
    if (cal_s)     begin e.kind = 3; got_q.push_back(e); end
    if (req_valid) begin e.kind = 4; got_q.push_back(e); end
  end

  // send one packet: start bit then opcode and data/address, C0/A0 first
  task automatic send(input logic [4:0] opc, input logic [4:0] dat, input int gap,
                      input int kind, input fc_req_t r, input int ndata);
    int p;
    logic [9:0] h;
    h = {opc, dat};
    @(negedge clk); clink = 1; p = cyc + 1;
    for (int i = 9; i >= 0; i--) begin @(negedge clk); clink = h[i]; end
    if (kind != 0) begin
      ev_t e; e.kind = kind; e.cycle = p + 10; e.req = r; e.req.header = h;
      exp_q.push_back(e);
    end
    if (ndata > 0) begin
      // the cycle after the header: a '1' that must not start a packet
      @(negedge clk); clink = 1;
      @(negedge clk); hold = 1; clink = 1'($urandom);
      repeat (ndata * 16) begin @(negedge clk); clink = 1'($urandom); end
      hold = 0; clink = 0;
    end
    for (int i = 0; i < gap; i++) begin @(negedge clk); clink = 0; end
  endtask

  function automatic fc_req_t mk(input bit w, input fc_target_e t, input int care);
    fc_req_t r; r = '0; r.write = w; r.target = t; r.care = 3'(care); return r;
  endfunction

  initial begin
    fc_req_t z;
    z = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    send(OP_SYNC, 5'h00, 0, 1, z, 0);
    send(OP_L1A, 5'h15, 0, 2, z, 0);
    send(OP_CAL, 5'h00, 0, 3, z, 0);
    send(OP_NOP, 5'h1F, 0, 0, z, 0);
    send(OP_CLEAR, 5'h00, 0, 0, z, 0);
    send(OP_READ_EVT, 5'h0A, 0, 0, z, 0);
    send(OP_L1A, 5'h03, 3, 2, z, 0);
    send(OP_RD_CTRL, 5'h00, 0, 4, mk(0, TGT_CTRL, 0), 0);
    send(OP_RD_CAL, 5'h00, 0, 4, mk(0, TGT_CAL, 0), 0);
    send(OP_RD_CARE, 5'h03, 0, 4, mk(0, TGT_CARE, 3), 0);
    send(OP_RD_CARE, 5'h07, 0, 0, z, 0);
    send(OP_RD_DAC, 5'h00, 0, 0, z, 0);
    send(OP_LRESET, 5'h00, 0, 0, z, 0);
    send(OP_RESERVED, 5'h00, 0, 0, z, 0);
    send(OP_WR_CTRL, 5'h00, 1, 4, mk(1, TGT_CTRL, 0), 8);
    send(OP_WR_CARE, 5'h06, 1, 4, mk(1, TGT_CARE, 6), 8);
    send(OP_WR_DAC, 5'h00, 1, 4, mk(1, TGT_DAC, 0), 16);
    send(OP_WR_CAL, 5'h00, 1, 4, mk(1, TGT_CAL, 0), 6);
    send(OP_WR_CARE, 5'h09, 0, 0, z, 0);
    send(OP_SYNC, 5'h00, 5, 1, z, 0);
    repeat (20) @(negedge clk);
    check(exp_q.size() == got_q.size(),
          $sformatf("event count %0d exp %0d", got_q.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < got_q.size(); i++) begin
      check(exp_q[i].kind == got_q[i].kind && exp_q[i].cycle == got_q[i].cycle,
            $sformatf("event %0d kind %0d@%0d exp %0d@%0d", i, got_q[i].kind,
                      got_q[i].cycle, exp_q[i].kind, exp_q[i].cycle));
      if (exp_q[i].kind == 4)
        check(exp_q[i].req == got_q[i].req, $sformatf("request %0d contents", i));
    end
    check(header == {OP_SYNC, 5'h00}, "last header kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
