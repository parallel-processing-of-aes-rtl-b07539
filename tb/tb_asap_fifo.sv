// tb_asap_fifo: random pushes and pops against a queue model; checks the
// head word, the full and empty flags, that every word comes out in order,
// and that the FIFO reached full and empty and did simultaneous push/pop.
module tb_asap_fifo;
  localparam int W = 128, D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [W-1:0] model [$];
  int n_full = 0, n_empty = 0, n_both = 0;

  asap_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .full, .empty);

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      chk("empty flag", 128'(empty), 128'(model.size() == 0));
      chk("full flag",  128'(full),  128'(model.size() == D));
      if (model.size() > 0) chk("head", rd_data, model[0]);
      if (full) n_full++;
      if (empty) n_empty++;
      // bias toward filling in the first half, draining in the second
      wr_en = !full  && ($urandom_range(99) < ((n / 250) % 2 ? 30 : 70));
      rd_en = !empty && ($urandom_range(99) < ((n / 250) % 2 ? 70 : 30));
      wr_data = {$urandom, $urandom, $urandom, $urandom};
      if (wr_en && rd_en) n_both++;
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    if (n_full == 0 || n_empty == 0 || n_both == 0) begin
      failures++; $display("FAIL full=%0d empty=%0d both=%0d", n_full, n_empty, n_both);
    end
    $display("full=%0d empty=%0d push_and_pop=%0d", n_full, n_empty, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
