// Self-checking test of the 16-function ALU.
// Random operands for every function, with and without carry forwarding,
// against a reference written here bit by bit (ripple adder, explicit loops)
// rather than with the operators the ALU uses.
module tb_alu;
  import mpsim_pkg::*;
  logic [7:0] a, t, y;
  logic [3:0] fn;
  logic fwd, c_flag, a_we, flags_we;
  flags_t fl;
  int checks = 0, failures = 0;

  alu dut (.a, .t, .fn, .fwd, .c_flag, .y, .a_we, .flags_we, .flags_in(fl));

  // ripple adder: x + y + ci, returns {carry, sum}
  function automatic logic [8:0] ripple(input logic [7:0] x, input logic [7:0] yy, input logic ci);
    logic c = ci; logic [7:0] s;
    for (int i = 0; i < 8; i++) begin
      s[i] = x[i] ^ yy[i] ^ c;
      c = (x[i] & yy[i]) | (x[i] & c) | (yy[i] & c);
    end
    return {c, s};
  endfunction

  task automatic ref_model(output logic [7:0] ey, output logic ewe, output logic efwe, output logic ec);
    logic cin;
    logic [8:0] r;
    cin = fwd & c_flag;
    ewe = 1; efwe = 1; ec = 0; ey = a;
    case (fn)
      0: begin ewe = 0; efwe = 0; end
      1: begin r = ripple(a, t, cin); ey = r[7:0]; ec = r[8]; end
      2: begin r = ripple(a, ~t, ~cin); ey = r[7:0]; ec = ~r[8]; end // borrow
      3: ey = a & t;
      4: ey = a | t;
      5: ey = a ^ t;
      6: ey = ~a;
      7: begin r = ripple(a, 8'h00, 1'b1); ey = r[7:0]; ec = r[8]; end
      8: begin r = ripple(a, 8'hFF, 1'b0); ey = r[7:0]; ec = ~r[8]; end
      9: begin for (int i = 7; i > 0; i--) ey[i] = a[i-1]; ey[0] = fwd ? c_flag : a[7]; ec = a[7]; end
      10: begin for (int i = 0; i < 7; i++) ey[i] = a[i+1]; ey[7] = fwd ? c_flag : a[0]; ec = a[0]; end
      11: ey = t;
      12: begin r = ripple(a, ~t, 1'b1); ey = r[7:0]; ec = ~r[8]; ewe = 0; end
      13: begin r = ripple(~a, 8'h00, 1'b1); ey = r[7:0]; ec = (a != 0); end
      14: ey = 8'h00;
      15: ey = {a[3:0], a[7:4]};
      default: ;
    endcase
  endtask

  initial begin
    logic [7:0] ey, v; logic ewe, efwe, ec; int ones;
    for (int n = 0; n < 4000; n++) begin
      a = 8'($urandom); t = 8'($urandom); fn = 4'(n % 16);
      fwd = 1'($urandom); c_flag = 1'($urandom);
      if (n < 64) begin a = (n & 1) ? 8'hFF : 8'h00; t = (n & 2) ? 8'hFF : 8'h01; end
      #1;
      ref_model(ey, ewe, efwe, ec);
      v = ey; // value the flags describe
      checks++;
      if (a_we !== ewe || flags_we !== efwe) begin failures++; $display("FAIL we fn=%0d", fn); end
      if (ewe) begin
        checks++;
        if (y !== ey) begin failures++; $display("FAIL y fn=%0d a=%h t=%h fwd=%b c=%b y=%h exp=%h", fn, a, t, fwd, c_flag, y, ey); end
      end else begin
        checks++;
        if (y !== a) begin failures++; $display("FAIL y kept fn=%0d", fn); end
      end
      if (efwe) begin
        ones = 0; for (int i = 0; i < 8; i++) ones += v[i];
        checks++;
        if (fl.c !== ec || fl.z !== (v == 0) || fl.s !== v[7] || fl.p !== (ones % 2 == 0)) begin
          failures++; $display("FAIL flags fn=%0d a=%h t=%h got %b exp c%b", fn, a, t, fl, ec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
