// tb_ctrl_regs: self-checking test of the control board I/O decode and latch.
//
// Checks the power-up state (Real low, Boot high), setting and clearing
// latch bits, the grant-byte strobe, serial controller and display strobes,
// one-clock acknowledge, and that cycles for other boards are not answered.
module tb_ctrl_regs;
  import tf_pkg::*;

  logic clk = 0, rst_n = 0;
  sbus_req_t req = SBUS_IDLE;
  sbus_rsp_t rsp;
  logic real_mode, boot, grant_wr, usart_cs, usart_cd, usart_wr, usart_rd, disp_wr;
  logic [7:0] ctrl_q, grant_data, usart_wdata, usart_rdata = 8'h5A, disp_wdata;
  logic [3:0] disp_addr;
  int checks = 0, failures = 0;
  int n_grant_wr = 0, n_usart_wr = 0, n_disp_wr = 0;
  logic [7:0] last_grant, last_disp;

  ctrl_regs dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (grant_wr) begin n_grant_wr++; last_grant = grant_data; end
    if (usart_wr) n_usart_wr++;
    if (disp_wr)  begin n_disp_wr++; last_disp = disp_wdata; end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One I/O cycle; returns read data and clocks until acknowledge.
  task automatic io(input logic we, input logic [7:0] port, input logic [15:0] wd,
                    output logic [15:0] rd, output int lat);
    @(negedge clk);
    req = '{cyc: 1'b1, we: we, mio: 1'b0, addr: 20'(port), wdata: wd, be: 2'b11};
    lat = 0;
    do begin @(posedge clk); lat++; #1; end while (!rsp.ack && lat < 10);
    rd = rsp.rdata;
    @(negedge clk);
    req = SBUS_IDLE;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] rd;
  int lat;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!real_mode && boot, "reset: Real low, Boot high");
    io(1, 8'h10, 16'h0001, rd, lat);           // Q0 <- 1
    check(real_mode && boot, "Real raised");
    check(lat == 1, $sformatf("ack after one clock (lat=%0d)", lat));
    io(1, 8'h20, 16'h00A5, rd, lat);           // grant byte
    check(n_grant_wr == 1 && last_grant == 8'hA5, "grant byte strobe");
    io(1, 8'h12, 16'h0001, rd, lat);           // Q1 <- 1 : Boot low
    check(real_mode && !boot, "Boot lowered");
    io(1, 8'h1E, 16'h0001, rd, lat);           // Q7
    check(ctrl_q == 8'h83, "Q7 set, others kept");
    io(1, 8'h10, 16'h0000, rd, lat);           // Q0 <- 0
    check(!real_mode && ctrl_q == 8'h82, "Real lowered");
    io(0, 8'h02, 16'h0000, rd, lat);           // USART status read
    check(rd == 16'h005A, "USART read data");
    io(1, 8'h00, 16'h0033, rd, lat);
    check(n_usart_wr == 1, "USART write strobe once");
    io(1, 8'h36, 16'h0041, rd, lat);
    check(n_disp_wr == 1 && last_disp == 8'h41, "display write");
    io(1, 8'h40, 16'h0001, rd, lat);           // DMA group: not ours
    check(lat == 10, "other board's port not answered");
    io(1, 8'h90, 16'h0001, rd, lat);           // node-local port
    check(lat == 10 && ctrl_q == 8'h82, "node-local port ignored");
    @(negedge clk);
    req = '{cyc: 1'b1, we: 1'b1, mio: 1'b1, addr: 20'h00010, wdata: 16'h0001, be: 2'b11};
    repeat (3) @(posedge clk);
    #1 check(!rsp.ack && ctrl_q == 8'h82, "memory cycle ignored");
    req = SBUS_IDLE;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
