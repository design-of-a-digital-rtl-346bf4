// Testbench of ram_port_ctrl: random read and write requests; checks that a
// raster read always gets the port, that a write is granted exactly when the
// raster does not read, and the address, data and enables sent to the RAM.
module ram_port_ctrl_tb;
  localparam int unsigned AW = 13, DW = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rd_req = 1'b0, wr_req = 1'b0;
  logic [AW-1:0] rd_addr = '0, wr_addr = '0, ram_addr;
  logic [DW-1:0] wr_data = '0, ram_wdata;
  logic wr_grant, ram_en, ram_we;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ram_port_ctrl dut (
    .clk, .rst_n, .rd_req, .rd_addr, .wr_req, .wr_addr, .wr_data, .wr_grant,
    .ram_en, .ram_we, .ram_addr, .ram_wdata
  );

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_grant;
    logic [AW-1:0] exp_addr;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      rd_req = ($urandom_range(3) == 0);
      wr_req = ($urandom_range(1) == 1);
      rd_addr = AW'($urandom()); wr_addr = AW'($urandom()); wr_data = DW'($urandom());
      #1;
      exp_grant = wr_req & ~rd_req;
      exp_addr = rd_req ? rd_addr : wr_addr;
      checks++;
      if (wr_grant != exp_grant || ram_we != exp_grant || ram_en != (rd_req | wr_req)
          || (ram_en && ram_addr != exp_addr) || (ram_we && ram_wdata != wr_data)) begin
        failures++;
        $display("FAIL: rd=%b wr=%b grant=%b en=%b we=%b addr=%h", rd_req, wr_req,
                 wr_grant, ram_en, ram_we, ram_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
