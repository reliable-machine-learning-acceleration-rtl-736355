// Shared helpers of the binary neural network (BNN) accelerator. Activations
// and weights are single bits: 1 encodes +1 and 0 encodes -1, so a product of
// two values is the XNOR of their bits and a dot product over n elements is
// 2*p - n, with p the number of matching bits.
package bnn_pkg;

  // Integer division rounded up: words needed to hold a bits in b-bit words.
  function automatic int unsigned ceil_div(input int unsigned a, input int unsigned b);
    return (a + b - 1) / b;
  endfunction

endpackage
