// tb_taint_regfile - checks the 32 x 1024-bit taint registers: three read
// ports, the full-width write, 64-bit chunk access, register 0 always clean
// and a full-width write winning over a chunk write to the same register.
module tb_taint_regfile;
  import mct_pkg::*;
  import mct_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0] ra1, ra2, ra3, wa, creg;
  tag_t rd1, rd2, rd3, wd;
  logic we = 0, cwe = 0;
  logic [3:0] cchunk;
  xword_t cwdata, crdata;

  taint_regfile dut (.clk, .rst_n, .ra1, .ra2, .ra3, .rd1, .rd2, .rd3, .we, .wa, .wd,
                     .cwe, .creg, .cchunk, .cwdata, .crdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tag_t model [32];

  task automatic chk;
    ra1 = 5'($urandom); ra2 = 5'($urandom); ra3 = 5'($urandom);
    creg = 5'($urandom); cchunk = 4'($urandom);
    #1;
    checks++;
    if (rd1 !== model[ra1] || rd2 !== model[ra2] || rd3 !== model[ra3] ||
        crdata !== model[creg][64*cchunk +: 64]) begin
      failures++;
      if (failures < 5) $display("FAIL read %0d %0d %0d", ra1, ra2, ra3);
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) model[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = $urandom_range(1); wa = 5'($urandom); wd = rand_tag();
      cwe = $urandom_range(1); creg = 5'($urandom); cchunk = 4'($urandom);
      cwdata = {$urandom, $urandom};
      if (n % 7 == 0) creg = wa;              // same-register collisions
      @(posedge clk);
      if (cwe && creg != 0) model[creg][64*cchunk +: 64] = cwdata;
      if (we && wa != 0)    model[wa] = wd;
      @(negedge clk);
      we = 0; cwe = 0;
      chk();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
