// tb_i2c_master: self-checking testbench for i2c_master.
//
// A behavioural slave written here (not the RTL slave) watches SCL and the
// master's SDA, decodes START, the eight address/R/W bits, the two data bytes
// and STOP, and drives the acknowledge slots and read data on the master's
// sda_in. It can be told to withhold the address or data-1 acknowledge.
// The testbench checks the decoded frames against the commands applied, the
// bytes read back, the acknowledge flags, the frame length in clock cycles
// (29 SCL periods = 116 quarters for a full frame, 11 SCL periods after an
// address NACK), the START/STOP counts and the bus state under reset.
// It runs with a quarter period of 5 clocks to keep the simulation short.
module tb_i2c_master;
  import i2c_pkg::*;

  localparam int unsigned CLK_HZ  = 2_000_000;
  localparam int unsigned SCL_HZ  = 100_000;
  localparam int unsigned QUARTER = CLK_HZ / (4 * SCL_HZ);

  logic       clk = 1'b0;
  logic       rst;
  i2c_cmd_t   cmd;
  logic       sda_in;
  logic       sda_out, scl;
  logic [7:0] s_datain1, s_datain2;
  logic [2:0] ack_rx;
  logic       busy, done;

  int checks = 0;
  int failures = 0;

  i2c_master #(.CLK_FREQ_HZ(CLK_HZ), .SCL_FREQ_HZ(SCL_HZ)) dut (
    .clk, .rst, .cmd, .sda_in, .sda_out, .scl,
    .s_datain1, .s_datain2, .ack_rx, .busy, .done
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- behavioural slave ----------------
  logic scl_q = 1'b1, sda_q = 1'b1;
  always @(posedge clk) begin
    scl_q <= scl;
    sda_q <= sda_out;
  end
  wire ev_rise  = scl & ~scl_q;
  wire ev_fall  = ~scl & scl_q;
  wire ev_start = scl & scl_q & sda_q & ~sda_out;
  wire ev_stop  = scl & scl_q & ~sda_q & sda_out;

  int starts = 0, stops = 0;
  always @(posedge clk) begin
    if (ev_start) starts++;
    if (ev_stop)  stops++;
  end

  bit         nack_addr  = 0;
  bit         nack_data1 = 0;
  logic [7:0] rd_byte1, rd_byte2;       // bytes the model sends on a read
  logic [7:0] got_addr_rw, got_d1, got_d2;
  int         frames_seen = 0;
  int         bytes_seen  = 0;

  // A START seen while waiting for anything else aborts the frame in
  // progress (the master was reset); the model then decodes a new frame.
  bit aborted = 0;

  task automatic wait_ev(input int which);  // 0 rise, 1 fall, 2 start, 3 stop
    if (aborted && which != 2) return;
    do @(posedge clk);
    while (!((which == 0 && ev_rise) || (which == 1 && ev_fall) ||
             (which == 2 && ev_start) || (which == 3 && ev_stop) ||
             (which != 2 && ev_start)));
    if (which != 2 && ev_start) aborted = 1;
  endtask

  task automatic ack_slot(input bit give);
    // called right after the fall that ends the 8th bit
    sda_in = give ? 1'b0 : 1'b1;
    wait_ev(1);
    sda_in = 1'b1;
  endtask

  task automatic recv_byte(output logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin
      wait_ev(0);
      b[i] = sda_out;
    end
    wait_ev(1);
  endtask

  task automatic send_byte(input logic [7:0] b);
    // the previous fall has just happened: put bit 7 out now
    for (int i = 7; i >= 0; i--) begin
      sda_in = b[i];
      wait_ev(1);
    end
    sda_in = 1'b1;
  endtask

  initial begin : slave_model
    logic [7:0] b;
    sda_in = 1'b1;
    forever begin
      if (!aborted) wait_ev(2);
      aborted = 0;
      sda_in  = 1'b1;
      recv_byte(b);
      got_addr_rw = b;
      bytes_seen  = 1;
      ack_slot(!nack_addr);
      if (!nack_addr) begin
        if (b[0] == RW_READ) send_byte(rd_byte1);
        else begin recv_byte(b); got_d1 = b; end
        bytes_seen = 2;
        ack_slot(!nack_data1);
        if (!nack_data1) begin
          if (got_addr_rw[0] == RW_READ) send_byte(rd_byte2);
          else begin recv_byte(b); got_d2 = b; end
          bytes_seen = 3;
          ack_slot(1'b1);
        end
      end
      wait_ev(3);
      if (!aborted) frames_seen++;
    end
  end

  // ---------------- stimulus ----------------
  task automatic wait_done(output longint cycles);
    longint c0 = 0;
    do begin @(posedge clk); c0++; end while (!done);
    cycles = c0;
  endtask

  task automatic run_frame(input i2c_cmd_t c, input bit na, input bit nd1,
                           input logic [7:0] r1, input logic [7:0] r2);
    longint cyc;
    int f0 = frames_seen;
    logic [2:0] exp_ack;
    cmd = c;
    nack_addr = na;
    nack_data1 = nd1;
    rd_byte1 = r1;
    rd_byte2 = r2;
    wait_done(cyc);
    repeat (2) @(posedge clk);
    check(frames_seen == f0 + 1, "model saw exactly one frame");
    check(got_addr_rw == {c.addr, c.rw}, $sformatf("address/rw %h expected %h", got_addr_rw, {c.addr, c.rw}));
    exp_ack = na ? 3'b000 : nd1 ? 3'b001 : 3'b111;
    check(ack_rx == exp_ack, $sformatf("ack_rx %b expected %b", ack_rx, exp_ack));
    if (!na && !nd1) begin
      if (c.rw == RW_WRITE) begin
        check(got_d1 == c.data1, $sformatf("data1 %h expected %h", got_d1, c.data1));
        check(got_d2 == c.data2, $sformatf("data2 %h expected %h", got_d2, c.data2));
      end else begin
        check(s_datain1 == r1, $sformatf("s_datain1 %h expected %h", s_datain1, r1));
        check(s_datain2 == r2, $sformatf("s_datain2 %h expected %h", s_datain2, r2));
      end
    end
  endtask

  // frame length between two done pulses with a constant command
  task automatic measure(input int exp_quarters);
    longint cyc;
    wait_done(cyc);
    wait_done(cyc);
    check(cyc == longint'(exp_quarters) * QUARTER,
          $sformatf("frame length %0d cycles expected %0d", cyc, exp_quarters * QUARTER));
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    i2c_cmd_t c;
    rst = 1'b1;
    cmd = '{addr: 7'h50, rw: RW_WRITE, data1: 8'hA5, data2: 8'h3C};
    repeat (10) @(posedge clk);
    check(scl == 1'b1 && sda_out == 1'b1 && !busy, "bus released in reset");
    rst = 1'b0;

    // first frame: write
    run_frame(cmd, 0, 0, 8'h00, 8'h00);
    // read
    run_frame('{addr: 7'h50, rw: RW_READ, data1: 8'h00, data2: 8'h00}, 0, 0, 8'h96, 8'h0F);
    // address not acknowledged
    run_frame('{addr: 7'h23, rw: RW_WRITE, data1: 8'h11, data2: 8'h22}, 1, 0, 8'h00, 8'h00);
    check(bytes_seen == 1, "no data after address NACK");
    // data 1 not acknowledged
    run_frame('{addr: 7'h50, rw: RW_WRITE, data1: 8'h77, data2: 8'h88}, 0, 1, 8'h00, 8'h00);
    check(bytes_seen == 2, "no data 2 after data 1 NACK");

    // frame lengths
    nack_addr = 0; nack_data1 = 0;
    measure(4 * (FRAME_SLOTS + 2));
    nack_addr = 1;
    cmd.addr = 7'h10;
    measure(4 * (8 + 1 + 2));
    nack_addr = 0;

    // random frames
    for (int i = 0; i < 12; i++) begin
      c.addr  = 7'($urandom);
      c.rw    = 1'($urandom);
      c.data1 = 8'($urandom);
      c.data2 = 8'($urandom);
      run_frame(c, 0, 0, 8'($urandom), 8'($urandom));
    end

    // reset in the middle of a frame returns the bus to idle
    repeat (40 * QUARTER) @(posedge clk);
    check(busy, "busy during frame");
    rst = 1'b1;
    @(posedge clk);
    @(posedge clk);
    check(scl == 1'b1 && sda_out == 1'b1 && !busy, "reset aborts frame");
    repeat (20) @(posedge clk);
    rst = 1'b0;
    cmd = '{addr: 7'h50, rw: RW_WRITE, data1: 8'hC3, data2: 8'h5A};
    run_frame(cmd, 0, 0, 8'h00, 8'h00);

    check(starts == stops + 1 || starts == stops, "START/STOP counts match");
    check(starts >= frames_seen, "every frame began with START");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
