// tb_trigger_if: self-checking test of the trigger interface.
// With short latencies (L1 window 10..14 clocks, L1-message timeout 5,
// L2 timeout 20, 50 bunches per orbit) the testbench plays: accepted events,
// an L2 reject, an L1 reject (no L1), and every erroneous sequence (L0 during
// a sequence, early L1, spurious L1, missing L1 message, missing L2,
// unexpected L2a). It checks each descriptor (dummy flag, error bits, bunch
// crossing and orbit at L0 from the testbench's own counters, L1 message,
// classes, ROI), the front-end strobes and seq_busy.
module tb_trigger_if;
  import carlosrx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic        bc_rst = 0, l0 = 0, l1 = 0, l1m_valid = 0, l2a = 0, l2r = 0;
  logic [9:0]  l1m_data = 0;
  logic [49:0] l2_classes = 0;
  logic [35:0] l2_roi = 0;
  logic        desc_valid, l2a_acc, fee_l0, fee_l1, fee_l2a, fee_l2r, seq_busy;
  trig_desc_t  desc;
  logic [11:0] bc_now;
  int checks = 0, failures = 0;
  int n_l0 = 0, n_l1 = 0, n_l2a = 0, n_l2r = 0, n_acc = 0;
  int bc_m = 0, orbit_m = 0;
  trig_desc_t got[$];

  trigger_if #(.L1_MIN(10), .L1_MAX(14), .L1M_TIMEOUT(5), .L2_TIMEOUT(20), .BC_PER_ORBIT(50)) dut (
    .clk, .rst_n, .bc_rst, .l0, .l1, .l1m_valid, .l1m_data, .l2a, .l2r, .l2_classes, .l2_roi,
    .desc_valid, .desc, .l2a_acc, .fee_l0, .fee_l1, .fee_l2a, .fee_l2r, .seq_busy, .bc_now);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference bunch/orbit counters and monitors
  always @(posedge clk) if (rst_n) begin
    if (bc_rst) begin bc_m = 0; orbit_m++; end
    else bc_m = (bc_m == 49) ? 0 : bc_m + 1;
    if (desc_valid) got.push_back(desc);
    n_l0 += fee_l0; n_l1 += fee_l1; n_l2a += fee_l2a; n_l2r += fee_l2r; n_acc += l2a_acc;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic tick(input int n = 1);
    repeat (n) @(negedge clk);
  endtask
  task automatic pulse(ref logic s);
    s = 1; tick(); s = 0;
  endtask

  // issue an L0 and return the bunch crossing and orbit it should record
  task automatic do_l0(output int bc, output int orb);
    l0 = 1; bc = bc_m; orb = orbit_m;
    @(negedge clk); l0 = 0;
  endtask

  task automatic expect_desc(input bit dummy, input logic [3:0] err, input int bc, input int orb,
                             input logic [9:0] msg, input logic [49:0] cl, input logic [35:0] roi,
                             input string what);
    tick(3);
    check(got.size() == 1, {what, ": one descriptor"});
    if (got.size() != 0) begin
      trig_desc_t d;
      d = got.pop_front();
      check(d.dummy == dummy, {what, ": dummy"});
      check(d.err == err, {what, ": error bits"});
      if (bc >= 0) check(d.bc == 12'(bc) && d.orbit == 24'(orb), {what, ": event id"});
      check(d.l1msg == msg, {what, ": L1 message"});
      check(d.classes == cl && d.roi == roi, {what, ": classes/roi"});
    end
    got.delete();
  endtask

  task automatic expect_none(input string what);
    tick(3);
    check(got.size() == 0, {what, ": no descriptor"});
    got.delete();
  endtask

  int bc, orb, k0, k1, k2a, k2r;
  initial begin
    tick(3); rst_n = 1; tick(2);
    // orbit strobes from time to time
    fork
      forever begin tick(37); bc_rst = 1; tick(); bc_rst = 0; end
    join_none

    // 1. accepted event
    k0 = n_l0; k1 = n_l1; k2a = n_l2a;
    do_l0(bc, orb);
    check(seq_busy, "busy after L0");
    tick(11); pulse(l1);
    tick(2); l1m_data = 10'h2A5; pulse(l1m_valid);
    tick(6); l2_classes = 50'h3_0000_1234_5678; l2_roi = 36'hA_BCDE_F012; pulse(l2a);
    expect_desc(0, 4'b0000, bc, orb, 10'h2A5, 50'h3_0000_1234_5678, 36'hA_BCDE_F012, "accepted");
    check(n_l0 == k0 + 1 && n_l1 == k1 + 1 && n_l2a == k2a + 1 && n_acc == 1, "front-end strobes");
    check(!seq_busy, "idle after L2a");

    // 2. L2 reject
    k2r = n_l2r;
    do_l0(bc, orb); tick(12); pulse(l1); tick(1); pulse(l1m_valid); tick(3); pulse(l2r);
    expect_none("L2r");
    check(n_l2r == k2r + 1, "L2r forwarded");

    // 3. L1 reject: no L1 at all
    do_l0(bc, orb); tick(13);
    check(seq_busy, "busy inside L1 window");
    tick(4);
    check(!seq_busy, "L1 reject ends the sequence");
    expect_none("L1 reject");

    // 4. L0error: L0 during the sequence
    k2r = n_l2r;
    do_l0(bc, orb); tick(3); pulse(l0);
    expect_desc(1, 4'b0001, bc, orb, 0, 0, 0, "L0error");
    check(n_l2r == k2r + 1, "L2r sent after error");

    // 5. L1err: L1 before the window
    do_l0(bc, orb); tick(4); pulse(l1);
    expect_desc(1, 4'b0010, bc, orb, 0, 0, 0, "L1err early");

    // 6. L1err: spurious L1 with no L0
    tick(5); pulse(l1);
    expect_desc(1, 4'b0010, -1, 0, 0, 0, 0, "L1err spurious");

    // 7. L1merr: L1 message missing
    do_l0(bc, orb); tick(11); pulse(l1); tick(10);
    expect_desc(1, 4'b0100, bc, orb, 0, 0, 0, "L1merr");

    // 8. L2err: L2 missing
    do_l0(bc, orb); tick(11); pulse(l1); l1m_data = 10'h155; pulse(l1m_valid); tick(25);
    expect_desc(1, 4'b1000, bc, orb, 10'h155, 0, 0, "L2err timeout");

    // 9. L2err: L2a with no sequence
    tick(3); pulse(l2a);
    expect_desc(1, 4'b1000, -1, 0, 0, 0, 0, "L2err spurious");

    // 10. a second good event after the errors
    do_l0(bc, orb); tick(13); pulse(l1); l1m_data = 10'h001; pulse(l1m_valid);
    l2_classes = 50'h1; l2_roi = 36'h2; tick(2); pulse(l2a);
    expect_desc(0, 4'b0000, bc, orb, 10'h001, 50'h1, 36'h2, "accepted again");
    check(n_acc == 2, "two accepted events");
    check(12'(bc_m) == bc_now, "bunch counter");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
