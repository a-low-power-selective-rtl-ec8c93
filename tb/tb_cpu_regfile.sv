// tb_cpu_regfile: random writes and dual reads against a shadow copy of the
// eight registers; checks the reset value and that a same-cycle read returns
// the old value.
module tb_cpu_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, we = 0;
  logic [2:0] wa = '0, ra = '0, rb = '0;
  logic [15:0] wd = '0, da, db;
  logic [15:0] shadow [8];
  always #5 clk = ~clk;
  cpu_regfile dut (.clk(clk), .rst(rst), .we_i(we), .waddr_i(wa), .wdata_i(wd),
                   .raddr_a_i(ra), .raddr_b_i(rb), .rdata_a_o(da), .rdata_b_o(db));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 8; r++) begin
      shadow[r] = '0;
      ra = 3'(r); #1;
      checks++;
      if (da !== 16'd0) begin failures++; $display("FAIL R%0d not reset", r); end
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = 1'($urandom_range(1)); wa = 3'($urandom); wd = 16'($urandom);
      ra = 3'($urandom); rb = (t % 4 == 0) ? wa : 3'($urandom);
      #1;
      checks += 2;
      if (da !== shadow[ra]) begin failures++; $display("FAIL A R%0d %h exp %h", ra, da, shadow[ra]); end
      if (db !== shadow[rb]) begin failures++; $display("FAIL B R%0d %h exp %h", rb, db, shadow[rb]); end
      @(posedge clk);
      if (we) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
