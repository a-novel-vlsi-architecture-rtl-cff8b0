// tb_input_memory: self-checking test of the image store.
// Writes random groups to random addresses, keeps a copy in a testbench
// array, and reads every written address back, checking the one-cycle
// synchronous read. Also checks that a read in the same cycle as a write to
// the same address returns the old word.
module tb_input_memory;
  localparam int unsigned DATA_W = 16, PER_UNIT = 8, DEPTH = 8192;
  localparam int unsigned AW = $clog2(DEPTH), W = PER_UNIT * DATA_W;

  logic clk = 0, wr_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0]  wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  logic [W-1:0] model [DEPTH];
  bit           written [DEPTH];

  input_memory #(.DATA_W(DATA_W), .PER_UNIT(PER_UNIT), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      wr_en   = 1;
      wr_addr = AW'($urandom_range(0, DEPTH - 1));
      wr_data = rand_word();
      model[wr_addr]   = wr_data;
      written[wr_addr] = 1;
    end
    @(negedge clk); wr_en = 0;
    for (int a = 0; a < DEPTH; a++) begin
      if (!written[a]) continue;
      rd_addr = AW'(a);
      @(negedge clk);
      checks++;
      if (rd_data !== model[a]) begin
        failures++;
        $display("read mismatch at %0d", a);
      end
    end
    // read-during-write to the same address returns the old word
    for (int a = 0; a < DEPTH; a++) if (written[a]) begin
      rd_addr = AW'(a); wr_addr = AW'(a); wr_en = 1; wr_data = ~model[a];
      @(negedge clk);
      wr_en = 0;
      checks++;
      if (rd_data !== model[a]) begin failures++; $display("read-during-write"); end
      @(negedge clk);
      checks++;
      if (rd_data !== ~model[a]) begin failures++; $display("write not seen"); end
      break;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
