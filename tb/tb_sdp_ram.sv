// tb_sdp_ram - self-checking test of the simple dual-port block RAM: random writes and reads
// against a reference array, one-clock read latency, and old data on a same-address
// read-during-write.
module tb_sdp_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [6:0] wa, ra;
  logic [15:0] wd, rd;
  logic [15:0] refm [128];
  logic        known [128];
  int checks = 0, failures = 0;
  sdp_ram #(.DW(16), .AW(7)) dut (.clk, .we_i(we), .wr_addr_i(wa), .wr_data_i(wd), .rd_addr_i(ra), .rd_data_o(rd));
  initial begin
    we = 0; wa = 0; ra = 0; wd = 0;
    foreach (known[i]) known[i] = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [15:0] expv;
      logic        expk;
      @(negedge clk);
      we = $urandom_range(0, 1); wa = 7'($urandom); wd = 16'($urandom);
      ra = (n % 3 == 0) ? wa : 7'($urandom);
      expv = refm[ra]; expk = known[ra];
      @(posedge clk); #1;
      if (we) begin refm[wa] = wd; known[wa] = 1; end
      if (expk) begin
        checks++;
        if (rd !== expv) begin failures++; $display("FAIL read %0d", ra); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
