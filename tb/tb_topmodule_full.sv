// tb_topmodule_full: the design at its default parameters (100 MHz clock,
// 100 kHz SCL, slave address 7'h50) taken through complete frames: a write
// of two bytes, a read that must return them, and a write to another address
// that must not be acknowledged. It checks the stored and returned bytes, the
// acknowledges, the SCL period (1000 clocks = 10 us) and the frame lengths
// (29 SCL periods = 290 us for a full frame, 11 = 110 us after an address
// NACK).
module tb_topmodule_full;
  import i2c_pkg::*;

  logic       clk = 1'b0;
  logic       rst, rst1;
  i2c_cmd_t   cmd;
  logic       scl, sda_bus;
  logic [7:0] s_data1, s_data2, s_datain1, s_datain2;
  logic       s_ack1, s_ack2, s_ack3;
  logic [2:0] ack_rx;
  logic       busy, done;

  topmodule dut (
    .clk, .rst, .rst1, .cmd, .scl, .sda_bus,
    .s_data1, .s_data2, .s_datain1, .s_datain2,
    .s_ack1, .s_ack2, .s_ack3, .ack_rx, .busy, .done
  );

  always #5 clk = ~clk;   // 100 MHz

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wait_done(output longint cycles);
    longint c0 = 0;
    do begin @(posedge clk); c0++; end while (!done);
    cycles = c0;
  endtask

  // SCL period, rising edge to rising edge, inside a frame
  longint last_rise = -1, period = 0, now = 0;
  logic   scl_q = 1'b1;
  always @(posedge clk) begin
    now++;
    scl_q <= scl;
    if (scl && !scl_q) begin
      if (last_rise >= 0) period = now - last_rise;
      last_rise = now;
    end
  end

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    longint cyc;
    rst  = 1'b1;
    rst1 = 1'b1;
    cmd  = '{addr: 7'h50, rw: RW_WRITE, data1: 8'hC6, data2: 8'h39};
    repeat (10) @(posedge clk);
    rst  = 1'b0;
    rst1 = 1'b0;

    wait_done(cyc);
    check(ack_rx == 3'b111 && s_ack1 && s_ack2 && s_ack3, "write acknowledged");
    check(s_data1 == 8'hC6 && s_data2 == 8'h39,
          $sformatf("slave holds %h %h", s_data1, s_data2));
    check(period == 1000, $sformatf("SCL period %0d clocks", period));

    cmd = '{addr: 7'h50, rw: RW_READ, data1: 8'h00, data2: 8'h00};
    wait_done(cyc);
    check(cyc == 29_000, $sformatf("read frame %0d clocks", cyc));
    check(ack_rx == 3'b111, "read acknowledged");
    check(s_datain1 == 8'hC6 && s_datain2 == 8'h39,
          $sformatf("read %h %h", s_datain1, s_datain2));

    cmd = '{addr: 7'h51, rw: RW_WRITE, data1: 8'h00, data2: 8'h00};
    wait_done(cyc);
    check(cyc == 11_000, $sformatf("NACK frame %0d clocks", cyc));
    check(ack_rx == 3'b000 && !s_ack1, "other address not acknowledged");
    check(s_data1 == 8'hC6 && s_data2 == 8'h39, "other address left data");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
