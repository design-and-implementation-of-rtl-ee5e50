// tb_i2c_slave: self-checking testbench for i2c_slave.
//
// A behavioural master written here drives SCL and SDA with a quarter period
// of Q clocks (SDA changes with SCL low, sampled with SCL high, START and STOP
// with SCL high). It writes two bytes to the slave, reads them back, addresses
// another slave, breaks a frame off with STOP and with a repeated START, and
// resets the slave. It checks the acknowledge seen on sda_out in every
// acknowledge slot, the bytes read, s_data1/s_data2, the s_ack flags, and that
// the slave never changes sda_out while SCL is high.
module tb_i2c_slave;
  import i2c_pkg::*;

  localparam logic [6:0] ADDR = 7'h3A;
  localparam int unsigned Q = 6;

  logic       clk = 1'b0;
  logic       rst1;
  logic       scl = 1'b1;
  logic       sda = 1'b1;
  logic       sda_out;
  logic       s_ack1, s_ack2, s_ack3;
  logic [7:0] s_data1, s_data2;

  int checks = 0;
  int failures = 0;

  i2c_slave #(.SLAVE_ADDR(ADDR)) dut (
    .clk, .rst1, .scl, .sda_in(sda), .sda_out,
    .s_ack1, .s_ack2, .s_ack3, .s_data1, .s_data2
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // the slave may change its SDA only while SCL is low
  logic scl_q = 1'b1, so_q = 1'b1;
  int   so_glitches = 0;
  always @(posedge clk) begin
    scl_q <= scl;
    so_q  <= sda_out;
    if (scl && scl_q && sda_out != so_q) so_glitches++;
  end

  task automatic quarter();
    repeat (Q) @(posedge clk);
  endtask

  task automatic i2c_start();
    sda = 1'b1; quarter();
    scl = 1'b1; quarter();
    sda = 1'b0; quarter();
    scl = 1'b0; quarter();
  endtask

  task automatic i2c_stop();
    sda = 1'b0; quarter();
    scl = 1'b1; quarter();
    sda = 1'b1; quarter();
    quarter();
  endtask

  // one bit slot; returns the slave's sda_out sampled with SCL high
  task automatic bit_slot(input logic b, output logic seen);
    sda = b;    quarter();
    scl = 1'b1; quarter();
    seen = sda_out;
    quarter();
    scl = 1'b0; quarter();
  endtask

  task automatic send_byte(input logic [7:0] v, output logic ack);
    logic s;
    for (int i = 7; i >= 0; i--) begin
      bit_slot(v[i], s);
      check(s == 1'b1, "slave leaves SDA released while master sends");
    end
    bit_slot(1'b1, s);
    ack = ~s;
  endtask

  task automatic recv_byte(output logic [7:0] v, output logic ack);
    logic s;
    for (int i = 7; i >= 0; i--) begin
      bit_slot(1'b1, s);
      v[i] = s;
    end
    bit_slot(1'b1, s);
    ack = ~s;
  endtask

  task automatic do_write(input logic [6:0] a, input logic [7:0] d1, input logic [7:0] d2,
                          output logic [2:0] acks);
    i2c_start();
    send_byte({a, RW_WRITE}, acks[0]);
    send_byte(d1, acks[1]);
    send_byte(d2, acks[2]);
    i2c_stop();
  endtask

  task automatic do_read(input logic [6:0] a, output logic [7:0] d1, output logic [7:0] d2,
                         output logic [2:0] acks);
    i2c_start();
    send_byte({a, RW_READ}, acks[0]);
    recv_byte(d1, acks[1]);
    recv_byte(d2, acks[2]);
    i2c_stop();
  endtask

  initial begin : watchdog
    repeat (500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [2:0] acks;
    logic [7:0] r1, r2, e1, e2;
    logic       a;
    rst1 = 1'b1;
    repeat (10) @(posedge clk);
    rst1 = 1'b0;
    repeat (10) @(posedge clk);
    check(sda_out && !s_ack1 && !s_ack2 && !s_ack3 && s_data1 == 0 && s_data2 == 0,
          "state after reset");

    // write then read back
    do_write(ADDR, 8'hA5, 8'h3C, acks);
    check(acks == 3'b111, $sformatf("write acks %b", acks));
    check(s_ack1 && s_ack2 && s_ack3, "s_ack flags after write");
    check(s_data1 == 8'hA5 && s_data2 == 8'h3C, $sformatf("stored %h %h", s_data1, s_data2));
    do_read(ADDR, r1, r2, acks);
    check(acks == 3'b111, $sformatf("read acks %b", acks));
    check(r1 == 8'hA5 && r2 == 8'h3C, $sformatf("read %h %h", r1, r2));
    check(s_data1 == 8'hA5 && s_data2 == 8'h3C, "read leaves data unchanged");

    // another slave's address: no acknowledge, nothing stored, flags clear
    do_write(ADDR ^ 7'h01, 8'h11, 8'h22, acks);
    check(acks == 3'b000, $sformatf("foreign address acks %b", acks));
    check(!s_ack1 && !s_ack2 && !s_ack3, "no s_ack for foreign address");
    check(s_data1 == 8'hA5 && s_data2 == 8'h3C, "foreign write ignored");

    // random write / read pairs
    for (int i = 0; i < 10; i++) begin
      e1 = 8'($urandom);
      e2 = 8'($urandom);
      do_write(ADDR, e1, e2, acks);
      check(acks == 3'b111 && s_data1 == e1 && s_data2 == e2, "random write");
      do_read(ADDR, r1, r2, acks);
      check(acks == 3'b111 && r1 == e1 && r2 == e2,
            $sformatf("random read %h %h expected %h %h", r1, r2, e1, e2));
    end

    // STOP after the address: frame ends, data unchanged
    i2c_start();
    send_byte({ADDR, RW_WRITE}, a);
    check(a, "address ack before early stop");
    i2c_stop();
    check(s_ack1 && !s_ack2 && s_data1 == e1, "early STOP");

    // repeated START in the middle of data 1, then a full write
    i2c_start();
    send_byte({ADDR, RW_WRITE}, a);
    for (int i = 0; i < 3; i++) bit_slot(1'b0, a);
    i2c_start();
    send_byte({ADDR, RW_WRITE}, acks[0]);
    send_byte(8'h5E, acks[1]);
    send_byte(8'hE5, acks[2]);
    i2c_stop();
    check(acks == 3'b111 && s_data1 == 8'h5E && s_data2 == 8'hE5, "write after repeated START");

    // reset clears the registers
    rst1 = 1'b1;
    repeat (3) @(posedge clk);
    rst1 = 1'b0;
    repeat (3) @(posedge clk);
    check(s_data1 == 0 && s_data2 == 0 && !s_ack1 && sda_out, "reset clears slave");

    check(so_glitches == 0, $sformatf("%0d SDA changes while SCL high", so_glitches));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
