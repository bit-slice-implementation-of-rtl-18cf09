// tb_data_memory: random loads, steps, reads and writes of the data
// memory and its address register, against a model. It checks that a
// write goes to the address held during the cycle even when the same
// instruction steps the address, that a read-modify-write (read, add
// one, write back) completes in a single cycle, and that a cancelled
// cycle changes nothing.
module tb_data_memory;
  localparam int AW = 16, DW = 16;
  logic clk = 0, rst_n = 0, en, dar_load, dar_inc, dar_dec, we;
  logic [DW-1:0] wdata, rdata;
  logic [AW-1:0] dar;
  int checks = 0, failures = 0;

  data_memory #(.AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h t=%0t", what, got, exp, $time);
    end
  endtask

  logic [DW-1:0] m_mem [logic [AW-1:0]];
  logic [AW-1:0] m_dar;

  initial begin
    en = 1; dar_load = 0; dar_inc = 0; dar_dec = 0; we = 0; wdata = 0; m_dar = 0;
    #12;
    @(negedge clk) rst_n = 1;
    check(dar, 0, "dar after reset");
    // Fill a small window so reads have known values.
    for (int a = 0; a < 64; a++) begin
      we = 1; dar_inc = 1; wdata = 16'(a * 977 + 3);
      m_mem[AW'(a)] = wdata;
      @(negedge clk);
    end
    m_dar = 64;
    check(dar, 64, "dar after fill");
    for (int t = 0; t < 4000; t++) begin
      int k;
      k = $urandom_range(5);
      dar_load = (k == 0); dar_inc = (k == 1); dar_dec = (k == 2);
      we = (k >= 1) && $urandom_range(1);
      en = ($urandom_range(7) != 0);
      // Load addresses stay in a window so reads hit written words.
      wdata = dar_load ? 16'($urandom_range(127)) :
              (k == 5 ? (rdata + 16'd1) : 16'($urandom));
      #1;
      check(dar, m_dar, "dar");
      if (m_mem.exists(m_dar)) check(rdata, m_mem[m_dar], "rdata");
      @(negedge clk);
      if (en) begin
        if (we) m_mem[m_dar] = wdata;
        if (dar_load) m_dar = wdata[AW-1:0];
        else if (dar_inc) m_dar = m_dar + 1;
        else if (dar_dec) m_dar = m_dar - 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
