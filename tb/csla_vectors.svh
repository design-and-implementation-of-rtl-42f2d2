// csla_vectors.svh: operand generator shared by the adder testbenches.
//
// next_vector(n, width, a, b, cin) returns test vector number n for a
// width-bit adder (width at most 128): the first vectors are boundary cases
// (zero, all ones, a carry entering at bit 0 and running up to every bit
// position in turn, alternating patterns); later ones are random. The
// carry-chain cases make every group boundary see both a 0 and a 1 carry.
`ifndef CSLA_VECTORS_SVH
`define CSLA_VECTORS_SVH

function automatic logic [127:0] rand128();
  return {$urandom, $urandom, $urandom, $urandom};
endfunction

task automatic next_vector(input int n, input int width,
                           output logic [127:0] a, output logic [127:0] b,
                           output logic cin);
  logic [127:0] mask = (width >= 128) ? '1 : ((128'd1 << width) - 128'd1);
  int nb = 8 + width;
  if (n < 8) begin
    case (n)
      0: begin a = '0; b = '0; cin = 1'b0; end
      1: begin a = '1; b = '0; cin = 1'b1; end  // carry ripples the whole word
      2: begin a = '1; b = '1; cin = 1'b1; end
      3: begin a = '1; b = '1; cin = 1'b0; end
      4: begin a = {64{2'b10}}; b = {64{2'b01}}; cin = 1'b1; end
      5: begin a = {64{2'b10}}; b = {64{2'b01}}; cin = 1'b0; end
      6: begin a = {32{4'hc}}; b = {32{4'h3}}; cin = 1'b1; end
      default: begin a = '0; b = '1; cin = 1'b0; end
    endcase
  end else if (n < nb) begin
    // Propagate a carry from cin up to bit position (n - 8), where it stops.
    int p = n - 8;
    a = (p == 0) ? '0 : ((128'd1 << p) - 128'd1);
    b = rand128() & ~((p == 0) ? '0 : ((128'd1 << p) - 128'd1));
    b[p] = 1'b0;
    a[p] = 1'b0;
    cin = 1'b1;
  end else begin
    a = rand128();
    b = rand128();
    cin = 1'($urandom);
  end
  a &= mask;
  b &= mask;
endtask

`endif
