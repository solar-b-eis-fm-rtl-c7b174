// Behavioural model of the board's boot PROM pair (two 8k x 8 PROMs, the
// second selected by address bit 13) for simulation only.  The flight
// contents are software and are not part of this design; here byte n of
// the PROM holds (n * 37 + 11) mod 256, so a testbench can work out every
// instruction the boot controller should copy: instruction i is bytes
// 6i..6i+5, most significant first.  d is 0 while ce_n is high.
module boot_prom_model (
  input  logic        ce_n,
  input  logic [13:0] addr,
  output logic [7:0]  d
);
  function automatic logic [7:0] content(input int n);
    return 8'((n * 37 + 11) % 256);
  endfunction

  assign d = ce_n ? 8'h00 : content(int'(addr));
endmodule
