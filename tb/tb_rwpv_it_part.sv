// tb_rwpv_it_part: check of one array part built from each kind of unit cell, W = 12
// bits. Ripple and lookahead adders: {so, po} must equal a + b + si. ALU (three 4-bit
// cells): for random select, mode and carry, po must match the function table of the
// whole 12-bit ALU and, where the carry is defined, so its active-low carry out.
module tb_rwpv_it_part;
  import rwpv_pkg::*;
  import rwpv_tb_ref_pkg::*;
  localparam int unsigned W = 12;
  logic [W-1:0] a, b, po_r, po_c, po_a;
  logic [CTL_W-1:0] ctl;
  logic si, so_r, so_c, so_a;
  int checks = 0, failures = 0;

  rwpv_it_part #(.CELL(CELL_RIPPLE), .W(W)) dut_r (.a, .b, .ctl, .si, .po(po_r), .so(so_r));
  rwpv_it_part #(.CELL(CELL_CLA4),   .W(W)) dut_c (.a, .b, .ctl, .si, .po(po_c), .so(so_c));
  rwpv_it_part #(.CELL(CELL_ALU4),   .W(W)) dut_a (.a, .b, .ctl, .si, .po(po_a), .so(so_a));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] sum;
    logic [127:0] fr;
    logic cr, known;
    for (int i = 0; i < 3000; i++) begin
      a = W'($urandom); b = W'($urandom); si = 1'($urandom); ctl = CTL_W'($urandom);
      if (i < 4) begin a = '1; b = '0; si = 1'b1; ctl = {1'b0, 4'b1001}; end // full carry ripple
      #1;
      sum = (W+1)'(a) + (W+1)'(b) + (W+1)'(si);
      checks += 2;
      if ({so_r, po_r} !== sum) begin
        failures++;
        $display("FAIL ripple a=%h b=%h si=%0b -> %0b %h", a, b, si, so_r, po_r);
      end
      if ({so_c, po_c} !== sum) begin
        failures++;
        $display("FAIL lookahead a=%h b=%h si=%0b -> %0b %h", a, b, si, so_c, po_c);
      end
      // ALU part: si is the active-low carry in
      fr = alu_ref(128'(a), 128'(b), ctl[3:0], ctl[4], ~si, W);
      checks++;
      if (po_a !== fr[W-1:0]) begin
        failures++;
        $display("FAIL alu m=%0b s=%b cn_n=%0b a=%h b=%h -> %h exp %h", ctl[4], ctl[3:0], si, a, b, po_a, fr[W-1:0]);
      end
      cr = alu_carry(128'(a), 128'(b), ctl[3:0], ~si, W, known);
      if (known && !ctl[4]) begin
        checks++;
        if (so_a !== ~cr) begin
          failures++;
          $display("FAIL alu carry s=%b a=%h b=%h -> %0b", ctl[3:0], a, b, so_a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
