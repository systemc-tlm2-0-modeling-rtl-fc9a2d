// tb_noc_crossbar -- checks that every decoded input reaches exactly the
// write port of the output FIFO its decoder chose, with its transaction,
// and that invalid inputs reach none. 2000 random vectors, checked
// combinationally against an expectation computed here.
module tb_noc_crossbar;
  import noc_pkg::*;

  logic [4:0] in_valid;
  logic [2:0] in_port [5];
  txn_t       in_txn  [5];
  logic [4:0] wr_en   [5];
  txn_t       wr_txn  [5][5];

  noc_crossbar u_dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2000; c++) begin
      in_valid = 5'($urandom);
      for (int i = 0; i < 5; i++) begin
        in_port[i]     = 3'($urandom_range(0, 4));
        in_txn[i]      = '0;
        in_txn[i].addr = $urandom;
        in_txn[i].seq  = 16'(c * 5 + i);
      end
      #1;
      for (int o = 0; o < 5; o++) begin
        for (int i = 0; i < 5; i++) begin
          automatic bit exp = in_valid[i] && in_port[i] == 3'(o);
          checks++;
          if (wr_en[o][i] !== exp || (exp && wr_txn[o][i] != in_txn[i])) begin
            failures++;
            $display("FAIL: vector %0d output %0d input %0d: en %0b expected %0b", c, o, i,
                     wr_en[o][i], exp);
          end
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
