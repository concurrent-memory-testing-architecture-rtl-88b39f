// tb_cmat_asnd_pg: the ASND pattern generator must produce
//   write 0 to cells 0..8;
//   for p = 0..255 (neighbours in Gray code p ^ (p >> 1), neighbour k being
//   cell k for k < 4, cell k+1 otherwise):
//     if p > 0: write the neighbour whose Gray bit changed, read it;
//     centre cell 4: w1, r, w0, r;
//   read cells 0..8
// = 1552 operations (K), advancing only on cycles with adv high. The
// expected list is built here, with the changed neighbour found by comparing
// consecutive Gray codes; a 9-cell memory driven by the generator must
// return exp on every read, and all 256 neighbour patterns must be seen by
// the centre cell. Run twice, the second time after a restart.
module tb_cmat_asnd_pg;
  import cmat_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, adv = 1'b0;
  logic active, we, wdata, exp, last;
  logic [1:0] dr, dc;
  int checks = 0, failures = 0;

  typedef struct { int cl; bit we; bit d; } op_t;
  op_t expq[$];
  bit mem9 [9];

  cmat_asnd_pg dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string s);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic void build();
    int g_prev, g;
    expq.delete();
    for (int c = 0; c < 9; c++) expq.push_back('{c, 1, 0});
    g_prev = 0;
    for (int p = 0; p < 256; p++) begin
      g = p ^ (p >> 1);
      for (int k = 0; k < 8; k++)
        if (((g ^ g_prev) >> k) & 1) begin
          int cl;
          cl = (k < 4) ? k : k + 1;
          expq.push_back('{cl, 1, 1'((g >> k) & 1)});
          expq.push_back('{cl, 0, 0});
        end
      g_prev = g;
      expq.push_back('{4, 1, 1});
      expq.push_back('{4, 0, 0});
      expq.push_back('{4, 1, 0});
      expq.push_back('{4, 0, 0});
    end
    for (int c = 0; c < 9; c++) expq.push_back('{c, 0, 0});
  endfunction

  // neighbour pattern seen by the centre cell when it is written to 1
  bit seen [256];
  function automatic int nbr_pattern();
    int v;
    v = 0;
    for (int k = 0; k < 8; k++) if (mem9[(k < 4) ? k : k + 1]) v |= (1 << k);
    return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      int nops;
      build();
      chk(expq.size() == ASND_K, "expected list has K entries");
      @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
      nops = 0;
      while (active) begin
        adv = 1'($urandom);
        #1;
        if (adv) begin
          op_t e;
          e = expq.pop_front();
          chk(int'(dr) * 3 + int'(dc) == e.cl && we == e.we && (!we || wdata == e.d),
              $sformatf("op %0d: cell %0d we %0d d %0d, exp cell %0d we %0d d %0d",
                        nops, int'(dr) * 3 + int'(dc), we, wdata, e.cl, e.we, e.d));
          if (!we) chk(mem9[int'(dr) * 3 + int'(dc)] == exp, "pattern read value");
          if (we && int'(dr) * 3 + int'(dc) == 4 && wdata) seen[nbr_pattern()] = 1;
          if (we) mem9[int'(dr) * 3 + int'(dc)] = wdata;
          chk(last == (expq.size() == 0), "last flag");
          nops++;
        end
        @(negedge clk);
      end
      chk(nops == ASND_K, $sformatf("length %0d", nops));
      for (int v = 0; v < 256; v++) chk(seen[v], $sformatf("neighbour pattern %0d applied", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
