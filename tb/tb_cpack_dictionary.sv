// tb_cpack_dictionary: drives random pushes (none, one or two per cycle)
// and clears into the FIFO dictionary and compares every entry and the write
// pointer with the reference FIFO, both the same-cycle view (clear empties
// the read view at once) and the state after the clock edge.
module tb_cpack_dictionary;
  import cpack_pkg::*;
  import cpack_ref_pkg::*;

  localparam int N = 16;
  logic       clk = 0, rst_n = 0;
  logic       clear, push0, push1;
  word_t      wdata0, wdata1;
  word_t      rd [N];
  logic [3:0] wptr;
  int checks = 0, failures = 0;
  int wraps = 0;

  cpack_dictionary #(.DICT_ENTRIES(N)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .push0(push0), .wdata0(wdata0),
    .push1(push1), .wdata1(wdata1), .rd_entries(rd), .rd_wptr(wptr));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(RefDict m, string what);
    checks++;
    if (wptr != 4'(m.wptr)) begin
      failures++;
      $display("FAIL %s: wptr %0d expected %0d", what, wptr, m.wptr);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (rd[i] != m.ent[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s: entry %0d %h expected %h", what, i, rd[i], m.ent[i]);
      end
    end
  endtask

  initial begin
    automatic RefDict m = new(N);
    clear = 0; push0 = 0; push1 = 0; wdata0 = 0; wdata1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare(m, "after reset");
    for (int t = 0; t < 2000; t++) begin
      int old;
      clear  = ($urandom_range(0, 29) == 0);
      push0  = 1'($urandom_range(0, 1));
      push1  = 1'($urandom_range(0, 1));
      wdata0 = $urandom;
      wdata1 = $urandom;
      #1;
      if (clear) m.clear();
      compare(m, "same-cycle view");
      old = m.wptr;
      if (push0) m.push(wdata0);
      if (push1) m.push(wdata1);
      if (m.wptr < old) wraps++;
      @(negedge clk);
      clear = 0; push0 = 0; push1 = 0;
      #1;
      compare(m, "after edge");
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL pointer never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
