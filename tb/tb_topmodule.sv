// tb_topmodule: end-to-end testbench of the master and slave together.
//
// It runs the master continuously, changing the command after every done
// pulse, and keeps its own model of the slave's two data registers. Each
// frame is one of: a write to the slave's address, a read from it (which must
// return the last bytes written), or a write to another address (which must
// not be acknowledged). It also resets the master in the middle of a frame
// and resets the slave between frames. After every frame it checks the
// acknowledges seen by the master and raised by the slave, the slave's data
// registers, the bytes read, and the frame length in clocks (116 quarter
// periods for a full frame, 44 after an address NACK). On the SDA bus it
// counts START and STOP conditions and any other SDA change while SCL is high.
// Every one of these mechanisms must occur at least once.
// The SCL quarter period is reduced to 5 clocks to keep the run short.
module tb_topmodule;
  import i2c_pkg::*;

  localparam int unsigned CLK_HZ  = 2_000_000;
  localparam int unsigned SCL_HZ  = 100_000;
  localparam int unsigned QUARTER = CLK_HZ / (4 * SCL_HZ);
  localparam logic [6:0]  SADDR   = 7'h2C;
  localparam int          NFRAMES = 60;

  logic       clk = 1'b0;
  logic       rst, rst1;
  i2c_cmd_t   cmd;
  logic       scl, sda_bus;
  logic [7:0] s_data1, s_data2, s_datain1, s_datain2;
  logic       s_ack1, s_ack2, s_ack3;
  logic [2:0] ack_rx;
  logic       busy, done;

  topmodule #(.CLK_FREQ_HZ(CLK_HZ), .SCL_FREQ_HZ(SCL_HZ), .SLAVE_ADDR(SADDR)) dut (
    .clk, .rst, .rst1, .cmd, .scl, .sda_bus,
    .s_data1, .s_data2, .s_datain1, .s_datain2,
    .s_ack1, .s_ack2, .s_ack3, .ack_rx, .busy, .done
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // bus monitor
  logic scl_q = 1'b1, sda_q = 1'b1;
  int   n_start = 0, n_stop = 0;
  always @(posedge clk) begin
    scl_q <= scl;
    sda_q <= sda_bus;
    if (scl && scl_q && sda_q && !sda_bus) n_start++;
    if (scl && scl_q && !sda_q && sda_bus) n_stop++;
  end

  // mechanism counters
  int n_write = 0, n_read = 0, n_nack = 0, n_mrst = 0, n_srst = 0, n_echo = 0;

  logic [7:0] m1 = 8'h00, m2 = 8'h00;   // model of the slave registers

  task automatic wait_done(output longint cycles);
    longint c0 = 0;
    do begin @(posedge clk); c0++; end while (!done);
    cycles = c0;
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    longint   cyc;
    i2c_cmd_t c;
    int       kind;
    rst  = 1'b1;
    rst1 = 1'b1;
    cmd  = '{addr: SADDR, rw: RW_WRITE, data1: 8'h12, data2: 8'h34};
    repeat (10) @(posedge clk);
    check(scl && sda_bus && s_data1 == 0 && s_data2 == 0, "idle after reset");
    rst  = 1'b0;
    rst1 = 1'b0;

    // first frame uses the command set in reset; its length is not measured
    wait_done(cyc);
    m1 = 8'h12; m2 = 8'h34; n_write++;
    check(ack_rx == 3'b111 && s_data1 == m1 && s_data2 == m2, "first write");

    for (int i = 0; i < NFRAMES; i++) begin
      kind = (i < 3) ? i : int'($urandom_range(0, 2));
      c.data1 = 8'($urandom);
      c.data2 = 8'($urandom);
      c.addr  = (kind == 2) ? (SADDR ^ 7'(1 + $urandom_range(0, 126))) : SADDR;
      c.rw    = (kind == 1) ? RW_READ : RW_WRITE;
      cmd = c;

      // a slave reset between frames, before the next START
      if (i == 20) begin
        rst1 = 1'b1;
        @(posedge clk);
        rst1 = 1'b0;
        m1 = '0; m2 = '0;
        n_srst++;
      end

      wait_done(cyc);
      if (i == 20) cyc++;   // the clock spent on the slave reset
      if (kind == 2) begin
        n_nack++;
        check(cyc == 44 * QUARTER, $sformatf("NACK frame %0d cycles", cyc));
        check(ack_rx == 3'b000, $sformatf("NACK ack_rx %b", ack_rx));
        check(!s_ack1 && !s_ack2 && !s_ack3, "slave silent for foreign address");
        check(s_data1 == m1 && s_data2 == m2, "foreign write ignored");
      end else begin
        check(cyc == 116 * QUARTER, $sformatf("frame %0d cycles", cyc));
        check(ack_rx == 3'b111, $sformatf("ack_rx %b", ack_rx));
        check(s_ack1 && s_ack2 && s_ack3, "slave acknowledged all three slots");
        if (kind == 0) begin
          n_write++;
          m1 = c.data1; m2 = c.data2;
          check(s_data1 == m1 && s_data2 == m2,
                $sformatf("slave holds %h %h expected %h %h", s_data1, s_data2, m1, m2));
        end else begin
          n_read++;
          check(s_datain1 == m1 && s_datain2 == m2,
                $sformatf("read %h %h expected %h %h", s_datain1, s_datain2, m1, m2));
          if (m1 != 0 || m2 != 0) n_echo++;
          check(s_data1 == m1 && s_data2 == m2, "read leaves slave data");
        end
      end

      // a master reset in the middle of a frame
      if (i == 40) begin
        cmd = '{addr: SADDR, rw: RW_WRITE, data1: 8'hEE, data2: 8'hDD};
        repeat (60 * QUARTER) @(posedge clk);
        rst = 1'b1;
        repeat (2) @(posedge clk);
        check(scl && sda_bus && !busy, "master reset releases the bus");
        check(s_data1 == m1, "aborted write did not reach data 1");
        repeat (10) @(posedge clk);
        rst = 1'b0;
        n_mrst++;
        cmd = '{addr: SADDR, rw: RW_READ, data1: 8'h00, data2: 8'h00};
        wait_done(cyc);
        check(cyc >= 116 * QUARTER && cyc <= 117 * QUARTER,
              $sformatf("first frame after reset %0d cycles", cyc));
        check(ack_rx == 3'b111 && s_datain1 == m1 && s_datain2 == m2,
              "slave recovers after master reset");
      end
    end

    check(n_start > NFRAMES && n_stop > NFRAMES - 2, "START/STOP conditions counted");
    check(n_start - n_stop <= 2, $sformatf("%0d STARTs %0d STOPs", n_start, n_stop));
    check(n_write > 0, "write frame happened");
    check(n_read  > 0, "read frame happened");
    check(n_echo  > 0, "read returned written data");
    check(n_nack  > 0, "address NACK happened");
    check(n_mrst  > 0, "master reset happened");
    check(n_srst  > 0, "slave reset happened");
    $display("frames: write %0d read %0d nack %0d, master resets %0d, slave resets %0d, START %0d STOP %0d",
             n_write, n_read, n_nack, n_mrst, n_srst, n_start, n_stop);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
