// tb_avalon_interconnect: drives every master address select value with
// random local addresses, reads and writes, and checks the decoded
// chipselect, the forwarded address/data/strobes and the readdata
// returned from a distinct value on each slave port (zero for a select
// with no slave).
// The address split tested is this design's own.
module tb_avalon_interconnect;
  localparam int NS = 6, SAW = 3, LAW = 9;
  logic clk = 0;
  logic [SAW+LAW-1:0] m_address = '0;
  logic m_read = 0, m_write = 0;
  logic [31:0] m_writedata = '0, m_readdata;
  logic [NS-1:0] s_chipselect;
  logic [LAW-1:0] s_address;
  logic s_read, s_write;
  logic [31:0] s_writedata;
  logic [31:0] s_readdata [NS];
  int checks = 0, failures = 0;

  avalon_interconnect #(.NS(NS), .SAW(SAW), .LAW(LAW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < NS; i++) s_readdata[i] = 32'hA000_0000 + 32'(i);
    for (int t = 0; t < 400; t++) begin
      automatic int sel = t % 8;
      automatic int kind = $urandom % 3;             // 0 idle, 1 read, 2 write
      logic [NS-1:0] exp_cs;
      @(negedge clk);
      m_address = {3'(sel), 9'($urandom)};
      m_read = (kind == 1); m_write = (kind == 2);
      m_writedata = $urandom;
      #1;
      exp_cs = (kind != 0 && sel < NS) ? NS'(1) << sel : '0;
      check($sformatf("chipselect sel=%0d kind=%0d", sel, kind), s_chipselect == exp_cs);
      check("forwarded", s_address == m_address[LAW-1:0] && s_read == m_read &&
                         s_write == m_write && s_writedata == m_writedata);
      if (kind == 1)
        check($sformatf("readdata sel=%0d", sel),
              m_readdata == ((sel < NS) ? 32'hA000_0000 + 32'(sel) : 32'h0));
    end
    @(negedge clk); m_read = 0; m_write = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
