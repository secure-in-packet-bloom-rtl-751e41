// tb_zf_registers -- self-checking test of the key register block. Writes
// K3 and the four O2 values through the register bus, checks the parallel
// key outputs, the keys_written pulse, read-back of every word, the status
// and counter words, that a request for another block's address passes
// through unanswered, and that every request comes out exactly one clock
// later.
module tb_zf_registers;
  import zf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  reg_bus_t reg_in = '0, reg_out;
  logic [255:0] k3;
  logic [3:0][255:0] o2;
  logic keys_written, initialized = 1'b1;
  logic [31:0] fwd_count = 32'h12345678, drop_count = 32'h00abcdef;
  int checks = 0, failures = 0, nkw = 0;

  always #4 clk = ~clk;
  always @(negedge clk) if (keys_written) nkw++;

  zf_registers dut (.clk, .rst_n, .reg_in, .reg_out, .k3, .o2, .keys_written,
                    .initialized, .fwd_count, .drop_count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one request; the reply must be on reg_out exactly one clock later
  task automatic access(input bit rd, input logic [22:0] addr, input logic [31:0] data,
                        output reg_bus_t rep);
    @(negedge clk);
    reg_in = '{req: 1'b1, ack: 1'b0, rd_wr_l: rd, addr: addr, data: data, src: 2'd2};
    @(negedge clk);
    rep = reg_out;
    reg_in = '0;
    check(rep.req && rep.addr == addr && rep.src == 2'd2 && rep.rd_wr_l == rd,
          "request forwarded after one clock");
  endtask

  initial begin
    reg_bus_t r;
    logic [255:0] ek3;
    logic [255:0] eo2 [4];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 8; w++) ek3[255-32*w -: 32] = $urandom;
    for (int l = 0; l < 4; l++) for (int w = 0; w < 8; w++) eo2[l][255-32*w -: 32] = $urandom;
    for (int w = 0; w < 8; w++) begin
      access(1'b0, 23'h040000 + 23'(w), ek3[255-32*w -: 32], r);
      check(r.ack, "write acknowledged");
    end
    for (int l = 0; l < 4; l++) for (int w = 0; w < 8; w++)
      access(1'b0, 23'h040000 + 23'(8 + 8*l + w), eo2[l][255-32*w -: 32], r);
    @(negedge clk);
    check(nkw == 40, $sformatf("keys_written pulses %0d", nkw));
    check(k3 == ek3, "K3 output");
    for (int l = 0; l < 4; l++) check(o2[l] == eo2[l], $sformatf("O2[%0d] output", l));
    for (int w = 0; w < 8; w++) begin
      access(1'b1, 23'h040000 + 23'(w), 32'h0, r);
      check(r.ack && r.data == ek3[255-32*w -: 32], "K3 read back");
    end
    for (int l = 0; l < 4; l++) for (int w = 0; w < 8; w++) begin
      access(1'b1, 23'h040000 + 23'(8 + 8*l + w), 32'h0, r);
      check(r.ack && r.data == eo2[l][255-32*w -: 32], "O2 read back");
    end
    access(1'b1, 23'h040000 + 23'(STATUS_OFF), 32'h0, r);
    check(r.data == 32'h1, "status word");
    access(1'b1, 23'h040000 + 23'(FWD_CNT_OFF), 32'h0, r);
    check(r.data == fwd_count, "forward counter");
    access(1'b1, 23'h040000 + 23'(DROP_CNT_OFF), 32'h0, r);
    check(r.data == drop_count, "drop counter");
    // another block's address: not acknowledged, data untouched, no write
    access(1'b0, 23'h050003, 32'hdeadbeef, r);
    check(!r.ack && r.data == 32'hdeadbeef, "foreign address passes through");
    check(k3 == ek3, "foreign write does not change K3");
    // a request already answered upstream is not answered again
    @(negedge clk);
    reg_in = '{req: 1'b1, ack: 1'b1, rd_wr_l: 1'b0, addr: 23'h040000, data: 32'h0, src: 2'd0};
    @(negedge clk);
    reg_in = '0;
    check(k3 == ek3, "acknowledged request ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
