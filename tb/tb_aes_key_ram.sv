// tb_aes_key_ram: writes random words, reads them back and checks the
// one-cycle read latency and old-data behaviour on a same-address
// read/write, against a shadow array.
module tb_aes_key_ram;
  logic         clk = 0;
  logic         we;
  logic [3:0]   waddr, raddr;
  logic [127:0] wdata, rdata;
  logic [127:0] shadow [11];
  int checks = 0, failures = 0;

  aes_key_ram dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill
    for (int i = 0; i < 11; i++) begin
      @(negedge clk);
      we = 1; waddr = 4'(i); wdata = {$urandom, $urandom, $urandom, $urandom};
      shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    // random traffic: read and write at once
    for (int n = 0; n < 2000; n++) begin
      logic [127:0] exp;
      @(negedge clk);
      raddr = 4'($urandom % 11);
      we    = 1'($urandom);
      waddr = 4'($urandom % 11);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      exp   = shadow[raddr];          // old data on a collision
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL read %0d got %032h exp %032h", raddr, rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
