// tb_ttc_link_tx: self-checking test of ttc_link_tx.
// Issues random fast commands and register frames, decodes the command line
// with an independent decoder and checks that every command arrives complete,
// in order, with frames carrying the requested fields, that frames are only
// accepted when frame_ready is high, and that a second instance with delay 7
// produces the same line 7 BCs later.  Finally it sends a burst of fast
// commands during a frame and checks the queue overflow flag.
module tb_ttc_link_tx;
  import trt_pkg::*;
  logic clk = 0, rst_n = 0, frame_req = 0;
  fast_cmd_e fc = FC_NONE;
  reg_frame_t frame = '0;
  logic frame_ready, busy, cmd0, cmd7, ovf0, ovf7, fr7, b7;
  int checks = 0, failures = 0;
  logic [63:0] exp_q [$];   // {type, payload}: type 1 L1A,2 BCR,3 ECR,4 frame
  logic line0 [$];
  logic line7 [$];

  ttc_link_tx #(.DLY_MAX(15)) dut0 (.clk, .rst_n, .fc, .frame_req, .frame, .frame_ready,
    .busy, .delay(4'd0), .cmd_out(cmd0), .fc_overflow(ovf0));
  ttc_link_tx #(.DLY_MAX(15)) dut7 (.clk, .rst_n, .fc, .frame_req, .frame, .frame_ready(fr7),
    .busy(b7), .delay(4'd7), .cmd_out(cmd7), .fc_overflow(ovf7));

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(logic cnd, string m);
    checks++;
    if (!cnd) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  always @(posedge clk) if (rst_n) begin line0.push_back(cmd0); line7.push_back(cmd7); end

  // independent decoder of line0
  int st = 0;
  logic [63:0] sh;
  int nb;
  int decoded = 0;
  bit chk_on = 1;
  always @(posedge clk) if (rst_n) begin
    if (nb == 0) begin
      if (cmd0) begin sh = 1; nb = 1; end
    end else begin
      sh = {sh[62:0], cmd0}; nb++;
      if (nb == 3 && sh[2:0] == 3'b110) begin got(64'd1 << 60); nb = 0; end
      else if (nb == 4 && sh[3:1] == 3'b101) begin got(sh[0] ? (64'd3 << 60) : (64'd2 << 60)); nb = 0; end
      else if (nb == 12 && sh[11:8] == 4'b1111) begin got((64'd4 << 60) | (64'd1 << 40) | {sh[7:0], 32'd0}); nb = 0; end
      else if (nb == 44 && sh[43:40] == 4'b1110) begin got((64'd4 << 60) | {sh[39:0]}); nb = 0; end
    end
  end
  initial nb = 0;

  task automatic got(logic [63:0] v);
    logic [63:0] e;
    if (!chk_on) return;
    decoded++;
    if (exp_q.size() == 0) begin chk(0, "unexpected command"); return; end
    e = exp_q.pop_front();
    chk(v == e, $sformatf("command %h expected %h at %0t", v, e, $time));
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0, last = 0; i < 6000; i++) begin
      int sel;
      @(negedge clk);
      fc = FC_NONE; frame_req = 0;
      // fast commands at least 12 BCs apart, so a 44-bit frame delays at most 4
      sel = $urandom % 24;
      if (sel < 3 && i - last < 12) sel = 10;
      if (sel < 3) last = i;
      case (sel)
        0: begin fc = FC_L1A; exp_q.push_back(64'd1 << 60); end
        1: begin fc = FC_BCR; exp_q.push_back(64'd2 << 60); end
        2: begin fc = FC_ECR; exp_q.push_back(64'd3 << 60); end
        3, 4: begin
          frame = {1'($urandom), 4'($urandom), 4'($urandom), 32'($urandom)};
          frame_req = 1;
          #1;
          if (frame_ready) exp_q.push_back((64'd4 << 60) | (frame.rw ? ((64'd1 << 40) | {frame.chip, frame.regad, 32'd0})
                                                                     : {1'b0, frame.chip, frame.regad, frame.data}));
        end
        default: ;
      endcase
    end
    @(negedge clk); fc = FC_NONE; frame_req = 0;
    repeat (100) @(negedge clk);
    chk(exp_q.size() == 0 && decoded > 300, $sformatf("all decoded (%0d left, %0d)", exp_q.size(), decoded));
    chk(!ovf0, "no overflow in normal traffic");
    for (int i = 7; i < line0.size(); i++) chk(line7[i] == line0[i - 7], "delay 7");
    // queue overflow: frame then 6 L1As in a row
    chk_on = 0;
    @(negedge clk); frame = '0; frame_req = 1; @(negedge clk); frame_req = 0;
    repeat (6) begin fc = FC_L1A; @(negedge clk); end
    fc = FC_NONE;
    repeat (60) @(negedge clk);
    chk(ovf0, "overflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
